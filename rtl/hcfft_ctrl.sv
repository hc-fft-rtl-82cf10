// Input controller: framing, inter-frame gap and run-time reconfiguration.
//
// A frame is S*N/4 accepted clocks (four samples each). The controller
//  - raises first on the first accepted clock of a frame;
//  - keeps in_ready high through a frame; the source must then hold in_valid
//    high for the whole frame, because the shuffle buffers run on every clock
//    (checked by an assertion);
//  - after each frame lowers in_ready for GAP clocks (64 by default), the gap
//    between consecutive transforms;
//  - applies a new configuration only between frames and only when no frame
//    is left in the pipeline (frames counted in at first, out at out_last);
//    meanwhile in_ready stays low. Frames with the same configuration follow
//    each other without draining.
// The requested configuration is made legal first: log2n is limited to
// 4..K, log2s to 0..2, and log2n is lowered until S*N <= 2**K.
// Timing: accept = in_valid & in_ready, combinational; cfg_act changes one
// clock after the drain completes.
module hcfft_ctrl
  import hcfft_pkg::*;
#(
  parameter int K   = 16,
  parameter int GAP = 64
) (
  input  logic clk,
  input  logic rst,
  input  cfg_t cfg_req,
  input  logic in_valid,
  output logic in_ready,
  output logic accept,
  output logic first,
  input  logic out_last,
  output cfg_t cfg_act,
  output logic gap_stall,   // in_ready low because of the inter-frame gap
  output logic cfg_stall    // in_ready low because a new configuration waits
);

  localparam int CB = K - 2;
  localparam int GW = $clog2(GAP + 2);

  cfg_t          cfg_ok;
  logic [CB-1:0] beat, beats_m1;
  logic          in_frame;
  logic [GW-1:0] gap_cnt;
  logic [7:0]    in_flight;
  logic          cfg_diff;

  always_comb begin
    logic [1:0] s;
    logic [4:0] n;
    cfg_ok = cfg_req;
    s = (cfg_req.log2s > 2'd2) ? 2'd2 : cfg_req.log2s;
    n = cfg_req.log2n;
    if (n < 5'd4) n = 5'd4;
    if (6'(n) + 6'(s) > 6'(K)) n = 5'(K) - 5'(s);
    cfg_ok.log2s = s;
    cfg_ok.log2n = n;
  end

  assign cfg_diff  = (cfg_ok != cfg_act);
  assign beats_m1  = CB'((32'(1) << (cfg_act.log2n + 5'(cfg_act.log2s) - 5'd2)) - 1);
  assign gap_stall = !in_frame && (gap_cnt != '0);
  assign cfg_stall = !in_frame && (gap_cnt == '0) && cfg_diff;
  assign in_ready  = in_frame || (!gap_stall && !cfg_diff);
  assign accept    = in_valid && in_ready;
  assign first     = accept && !in_frame;

  always_ff @(posedge clk) begin
    if (rst) begin
      beat      <= '0;
      in_frame  <= 1'b0;
      gap_cnt   <= '0;
      in_flight <= '0;
      cfg_act   <= cfg_ok;
    end else begin
      in_flight <= in_flight + 8'(first) - 8'(out_last);
      if (gap_cnt != '0 && !in_frame) gap_cnt <= gap_cnt - 1'b1;
      if (accept) begin
        if (beat == beats_m1) begin
          beat     <= '0;
          in_frame <= 1'b0;
          gap_cnt  <= GW'(GAP);
        end else begin
          beat     <= beat + 1'b1;
          in_frame <= 1'b1;
        end
      end
      if (cfg_stall && in_flight == '0) cfg_act <= cfg_ok;
    end
  end

  // once a frame has started its data must arrive on every clock
  a_contiguous: assert property (@(posedge clk) disable iff (rst) in_frame |-> in_valid)
    else $error("in_valid dropped inside a frame");

endmodule
