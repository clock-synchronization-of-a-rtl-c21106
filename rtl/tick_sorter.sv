// tick_sorter -- Block B, the tick sequence generator.
//
// Takes the n arrival counts of Block A and arranges them in ascending order, each with the ID
// (input index 0..n-1) of the clock it belongs to. The result is the tick sequence: position 0
// holds the fastest clock of the global clock cycle, position n-1 the slowest. The sorting is
// done by a network of comparison-and-exchange modules (sort_core). When n is not a power of
// two the network is widened to the next power of two NP and the extra inputs are filled with
// the all-ones count, the value of a clock that has not ticked, and the IDs n..NP-1, so they
// sort towards the end; the outputs give all NP positions.
// Purely combinational: for n = 8 the longest path crosses 7 comparison-and-exchange modules.
module tick_sorter
  import clksync_pkg::*;
#(
  parameter int N  = 8,                 // n, number of inputs of the clock, itself included
  parameter int W  = 6,                 // k, width of a count
  parameter int NP = pow2_ceil(N),      // width of the sorting network
  parameter int IW = idx_w(NP)          // clock ID width
) (
  input  logic [N-1:0][W-1:0]   count_i,   // count of clock i (Block A register i)
  output logic [NP-1:0][W-1:0]  seq_cnt,   // counts in ascending order
  output logic [NP-1:0][IW-1:0] seq_id     // IDs of the clocks in the same order
);

  logic [NP-1:0][W-1:0]  pad_cnt;
  logic [NP-1:0][IW-1:0] pad_id;

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      pad_cnt[i] = (i < N) ? count_i[i] : '1;
      pad_id[i]  = IW'(i);
    end
  end

  sort_core #(.NP(NP), .W(W), .IW(IW)) u_core (
    .in_cnt(pad_cnt), .in_id(pad_id), .out_cnt(seq_cnt), .out_id(seq_id));

endmodule
