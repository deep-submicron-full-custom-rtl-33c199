// ldpc_ctrl -- block-level controller of the decoder.
//
// It steps the whole node array through the W+2-cycle iteration plan by
// broadcasting a phase_t word (cycle index plus decoded strobes), counts
// iterations and decides when a block is finished.
//
// Block flow: IDLE waits for a complete block in the input buffer; INIT
// (one cycle) copies the channel values into the bit nodes; RUN executes
// iterations. In cycle W of every iteration the check nodes report the parity
// of the hard decisions that the bit nodes formed at the end of the previous
// iteration (after it-1 iterations). The block ends there when
//   - early termination is enabled (et_en) and every parity check holds, or
//   - it-1 has reached max_iter.
// iters_o = it-1 and conv_o = "all parity checks hold" are then handed to the
// output buffer with the hard decisions (store). If the output buffer is still
// busy the controller waits in HOLD with the nodes frozen.
//
// ph.run is the enable of every node register. Outside RUN it is low, so the
// node array is idle exactly as it would be behind a global clock gate once
// the block has been decoded or terminated early.
//
// Latency: 1 cycle INIT + (iters+1)*(W+2) - 1 cycles of RUN per block
// (8 cycles per iteration for W = 6).
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned W   = W_DEF,
  parameter int unsigned ITW = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_full,     // input buffer holds a whole block
  input  logic           out_free,    // output buffer can take a block
  input  logic [ITW-1:0] max_iter,    // I_MAX
  input  logic           et_en,       // early termination enable
  input  logic           parity_all,  // all check-node parity checks hold
  output phase_t         ph,
  output logic           take_in,     // pulse: channel values taken over
  output logic           store,       // pulse: decisions handed to output
  output logic [ITW-1:0] iters_o,
  output logic           conv_o,
  output logic           busy
);
  typedef enum logic [1:0] {S_IDLE, S_INIT, S_RUN, S_HOLD} state_t;

  localparam int unsigned LASTC = W + 1;

  state_t         state_q;
  logic [3:0]     cyc_q;
  logic [ITW:0]   it_q;           // iteration being executed, 1-based
  logic [ITW-1:0] iters_q;
  logic           conv_q;
  logic           finish;

  assign finish = (state_q == S_RUN) && (int'(cyc_q) == int'(W)) &&
                  ((et_en && parity_all) || ((it_q - 1'b1) >= {1'b0, max_iter}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cyc_q   <= '0;
      it_q    <= '0;
      iters_q <= '0;
      conv_q  <= 1'b0;
    end else begin
      case (state_q)
        S_IDLE: if (in_full) state_q <= S_INIT;
        S_INIT: begin
          state_q <= S_RUN;
          cyc_q   <= '0;
          it_q    <= (ITW+1)'(1);
        end
        S_RUN: begin
          if (finish) begin
            iters_q <= ITW'(it_q - 1'b1);
            conv_q  <= parity_all;
            state_q <= out_free ? S_IDLE : S_HOLD;
          end
          if (int'(cyc_q) == int'(LASTC)) begin
            cyc_q <= '0;
            it_q  <= it_q + 1'b1;
          end else begin
            cyc_q <= cyc_q + 1'b1;
          end
        end
        S_HOLD: if (out_free) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ph.cyc     = cyc_q;
    ph.run     = (state_q == S_RUN);
    ph.init    = (state_q == S_INIT);
    ph.bn_sat  = (cyc_q == 4'd0);
    ph.cn_sign = (cyc_q == 4'd1);
    ph.cn_mag  = (int'(cyc_q) >= 2) && (int'(cyc_q) <= int'(W) - 1);
    ph.bn_msb  = (cyc_q == 4'd3);
    ph.bn_mag  = (int'(cyc_q) >= 4) && (int'(cyc_q) <= int'(LASTC));
    ph.bn_last = (int'(cyc_q) == int'(LASTC));
  end

  assign take_in = (state_q == S_INIT);
  // Hand over in the finishing cycle when the buffer is free, else from HOLD.
  assign store   = (finish && out_free) || (state_q == S_HOLD && out_free);
  assign iters_o = finish ? ITW'(it_q - 1'b1) : iters_q;
  assign conv_o  = finish ? parity_all : conv_q;
  assign busy    = (state_q != S_IDLE);
endmodule
