// sort_core -- recursive power-of-two sorting network used by the tick sequence sorter.
//
// For NP = 2 it is one comparison-and-exchange module and for NP = 4 one 4-input sorter. For
// larger NP it is built from four NP/2-input sorters: the two halves of the input are sorted,
// a column of NP/2 comparison-and-exchange modules compares element i of the upper result with
// element NP/2-1-i of the lower result, all min outputs go to a third NP/2-input sorter that
// produces outputs 0..NP/2-1, and all max outputs go to a fourth that produces NP/2..NP-1.
// Because both halves are sorted, the min outputs are exactly the NP/2 least entries, so the
// result is fully sorted. The four-sorter recursion around a compare-exchange column is the
// published structure; the pairing of element i with element NP/2-1-i is this design's choice.
// Purely combinational; depth d(NP) = 2 d(NP/2) + 1 with d(4) = 3.
// Note on lint warnings: when this module is itself the top of a Verilator lint run, Verilator
// does not expand the nested sort_core instances and reports their ports, and the up/lo
// signals, as undriven or unused. Under tick_sorter the recursion is expanded completely and
// those warnings do not appear; the tick sorter's testbench sorts through all of it.
module sort_core #(
  parameter int NP = 8,  // number of entries, a power of two >= 2
  parameter int W  = 6,
  parameter int IW = 3
) (
  input  logic [NP-1:0][W-1:0]  in_cnt,
  input  logic [NP-1:0][IW-1:0] in_id,
  output logic [NP-1:0][W-1:0]  out_cnt,
  output logic [NP-1:0][IW-1:0] out_id
);

  if (NP == 2) begin : g_two
    cmp_exchange #(.W(W), .IW(IW)) u_ce (
      .a_cnt(in_cnt[0]), .a_id(in_id[0]), .b_cnt(in_cnt[1]), .b_id(in_id[1]), .invert(1'b0),
      .min_cnt(out_cnt[0]), .min_id(out_id[0]), .max_cnt(out_cnt[1]), .max_id(out_id[1]));
  end else if (NP == 4) begin : g_four
    sorter4 #(.W(W), .IW(IW)) u_s4 (
      .in_cnt(in_cnt), .in_id(in_id), .out_cnt(out_cnt), .out_id(out_id));
  end else begin : g_rec
    localparam int H = NP / 2;
    logic [H-1:0][W-1:0]  up_cnt, lo_cnt, mn_cnt, mx_cnt;
    logic [H-1:0][IW-1:0] up_id,  lo_id,  mn_id,  mx_id;

    sort_core #(.NP(H), .W(W), .IW(IW)) u_upper (
      .in_cnt(in_cnt[H-1:0]), .in_id(in_id[H-1:0]), .out_cnt(up_cnt), .out_id(up_id));
    sort_core #(.NP(H), .W(W), .IW(IW)) u_lower (
      .in_cnt(in_cnt[NP-1:H]), .in_id(in_id[NP-1:H]), .out_cnt(lo_cnt), .out_id(lo_id));

    for (genvar i = 0; i < H; i++) begin : g_col
      cmp_exchange #(.W(W), .IW(IW)) u_ce (
        .a_cnt(up_cnt[i]), .a_id(up_id[i]), .b_cnt(lo_cnt[H-1-i]), .b_id(lo_id[H-1-i]),
        .invert(1'b0),
        .min_cnt(mn_cnt[i]), .min_id(mn_id[i]), .max_cnt(mx_cnt[i]), .max_id(mx_id[i]));
    end

    sort_core #(.NP(H), .W(W), .IW(IW)) u_min (
      .in_cnt(mn_cnt), .in_id(mn_id), .out_cnt(out_cnt[H-1:0]), .out_id(out_id[H-1:0]));
    sort_core #(.NP(H), .W(W), .IW(IW)) u_max (
      .in_cnt(mx_cnt), .in_id(mx_id), .out_cnt(out_cnt[NP-1:H]), .out_id(out_id[NP-1:H]));
  end

endmodule
