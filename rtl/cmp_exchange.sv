// cmp_exchange -- comparison and exchange module (2-input sorter) of the tick sequence sorter.
//
// Each input is a k-bit arrival count with the ID of the clock that produced it. The counts are
// compared by subtraction: the carry out of B + ~A is formed as a carry-lookahead sum
//   Cout = G[W-1] | P[W-1]G[W-2] | ... | P[W-1]..P[1]G[0],  G[i] = ~A[i] & B[i], P[i] = ~A[i] | B[i]
// so Cout = 1 exactly when count B is larger than count A. Cout, exclusive-ORed with the
// `invert` input, drives the select of the MIN multiplexer directly and the select of the MAX
// multiplexer through an inverter. With invert = 0 the lesser count and its ID leave on the
// min outputs and the greater on the max outputs; invert = 1 exchanges them (descending order).
// When both counts are equal the B input leaves on the min side.
// Purely combinational. The structure (lookahead comparator, XOR with invert, two multiplexers)
// follows the published comparison-and-exchange module; the P term and the tie rule are this
// design's reading of it.
module cmp_exchange #(
  parameter int W  = 6,  // count width k
  parameter int IW = 3   // clock ID width
) (
  input  logic [W-1:0]  a_cnt,
  input  logic [IW-1:0] a_id,
  input  logic [W-1:0]  b_cnt,
  input  logic [IW-1:0] b_id,
  input  logic          invert,
  output logic [W-1:0]  min_cnt,
  output logic [IW-1:0] min_id,
  output logic [W-1:0]  max_cnt,
  output logic [IW-1:0] max_id
);

  logic [W-1:0] g, p;
  logic         cout;
  logic         sel;

  assign g = ~a_cnt & b_cnt;
  assign p = ~a_cnt | b_cnt;

  // Lookahead sum: term i is G[i] with the propagates of all higher bits.
  always_comb begin
    logic run;
    cout = 1'b0;
    for (int i = 0; i < W; i++) begin
      run = g[i];
      for (int j = i + 1; j < W; j++) run = run & p[j];
      cout = cout | run;
    end
  end

  assign sel = cout ^ invert;

  // Multiplexers: select = 1 passes input i (A), select = 0 passes input j (B).
  assign min_cnt = sel  ? a_cnt : b_cnt;
  assign min_id  = sel  ? a_id  : b_id;
  assign max_cnt = !sel ? a_cnt : b_cnt;
  assign max_id  = !sel ? a_id  : b_id;

endmodule
