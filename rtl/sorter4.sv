// sorter4 -- 4-input sorter, the basic building block of the tick sequence sorter.
//
// Sorts four (count, clock ID) pairs into ascending order of count with five
// comparison-and-exchange modules in three stages: (0,1) and (2,3), then (0,2) and (1,3),
// then (1,2). Output 0 carries the least count. Purely combinational, three module delays.
// The text only names a 4-input sorter as a building block; this optimal five-comparator
// network is this design's choice.
module sorter4 #(
  parameter int W  = 6,
  parameter int IW = 3
) (
  input  logic [3:0][W-1:0]  in_cnt,
  input  logic [3:0][IW-1:0] in_id,
  output logic [3:0][W-1:0]  out_cnt,
  output logic [3:0][IW-1:0] out_id
);

  logic [3:0][W-1:0]  s1_cnt, s2_cnt;
  logic [3:0][IW-1:0] s1_id,  s2_id;

  // Stage 1
  cmp_exchange #(.W(W), .IW(IW)) u_ce01 (
    .a_cnt(in_cnt[0]), .a_id(in_id[0]), .b_cnt(in_cnt[1]), .b_id(in_id[1]), .invert(1'b0),
    .min_cnt(s1_cnt[0]), .min_id(s1_id[0]), .max_cnt(s1_cnt[1]), .max_id(s1_id[1]));
  cmp_exchange #(.W(W), .IW(IW)) u_ce23 (
    .a_cnt(in_cnt[2]), .a_id(in_id[2]), .b_cnt(in_cnt[3]), .b_id(in_id[3]), .invert(1'b0),
    .min_cnt(s1_cnt[2]), .min_id(s1_id[2]), .max_cnt(s1_cnt[3]), .max_id(s1_id[3]));
  // Stage 2
  cmp_exchange #(.W(W), .IW(IW)) u_ce02 (
    .a_cnt(s1_cnt[0]), .a_id(s1_id[0]), .b_cnt(s1_cnt[2]), .b_id(s1_id[2]), .invert(1'b0),
    .min_cnt(s2_cnt[0]), .min_id(s2_id[0]), .max_cnt(s2_cnt[2]), .max_id(s2_id[2]));
  cmp_exchange #(.W(W), .IW(IW)) u_ce13 (
    .a_cnt(s1_cnt[1]), .a_id(s1_id[1]), .b_cnt(s1_cnt[3]), .b_id(s1_id[3]), .invert(1'b0),
    .min_cnt(s2_cnt[1]), .min_id(s2_id[1]), .max_cnt(s2_cnt[3]), .max_id(s2_id[3]));
  // Stage 3
  cmp_exchange #(.W(W), .IW(IW)) u_ce12 (
    .a_cnt(s2_cnt[1]), .a_id(s2_id[1]), .b_cnt(s2_cnt[2]), .b_id(s2_id[2]), .invert(1'b0),
    .min_cnt(out_cnt[1]), .min_id(out_id[1]), .max_cnt(out_cnt[2]), .max_id(out_id[2]));

  assign out_cnt[0] = s2_cnt[0];
  assign out_id[0]  = s2_id[0];
  assign out_cnt[3] = s2_cnt[3];
  assign out_id[3]  = s2_id[3];

endmodule
