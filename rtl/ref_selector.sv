// ref_selector -- Block C, the reference signal selector.
//
// Implements the reference function of the phase-locked algorithm for a clock with n inputs
// (itself included) that tolerates m faulty clocks (n > 3m). From the tick sequence of Block B
// it finds the position x (1-based) of its own clock and chooses:
//   x >= n-m : the (m+1)th clock of the tick sequence   (rule SLOW)
//   x <= 2m  : the (2m+1)th clock                        (rule FAST)
//   otherwise: the (2m)th clock                          (rule MID)
// The chosen position is never x itself. Each position of the sequence has an equality
// decoder ("AND gate") that matches its ID against SELF_ID; three OR gates group the decoders
// into the three ranges. At Line A three ceil(log2 n)-bit registers load the IDs found at
// positions m+1, 2m and 2m+1, each with an enable bit set by its range's OR gate. Each register
// drives the select of an n-to-1 multiplexer over the raw input clocks C_1..C_n, the enable
// gates it, and the three outputs are ORed into the reference signal. So the selection made
// from one cycle's tick sequence steers the reference during the next cycle.
// Positions beyond n (padding of the sorting network) are part of the SLOW range, so an own
// clock that did not tick at all is treated as the slowest. The three ranges, registers and
// multiplexers follow the published circuit; the encoding of IDs and the reset are this design's.
// Timing: selection registers change at the clk_hf edge where line_a is high; ref_sig is a
// combinational function of c_in and those registers.
module ref_selector
  import clksync_pkg::*;
#(
  parameter int N       = 8,               // n, inputs including the own clock
  parameter int M       = 2,               // m, faulty clocks tolerated (n > 3m, m >= 1)
  parameter int SELF_ID = 0,               // index of the own clock among the inputs
  parameter int NP      = pow2_ceil(N),    // positions delivered by the sorter
  parameter int IW      = idx_w(NP)        // ID width
) (
  input  logic                  clk_hf,
  input  logic                  rst_n,
  input  logic                  line_a,    // load strobe, start of a gcc
  input  logic [NP-1:0][IW-1:0] seq_id,    // tick sequence: clock IDs, fastest first
  input  logic [N-1:0]          c_in,      // raw input clocks
  output logic                  ref_sig,   // reference signal for Block D
  output rule_e                 rule,      // rule in force during this gcc
  output logic [IW-1:0]         ref_id,    // ID of the clock used as reference
  output logic [IW:0]           own_pos    // x, 1-based position of the own clock last gcc
);

  logic [NP-1:0] hit;
  logic          grp_fast, grp_mid, grp_slow;
  logic [IW-1:0] id_m1, id_2m, id_2m1;       // registered selections
  logic          en_m1, en_2m, en_2m1;       // registered enables
  logic          mux_m1, mux_2m, mux_2m1;
  logic [IW:0]   pos_now;

  // Decoders and the three OR gates (position p is 1-based: p = index + 1).
  always_comb begin
    grp_fast = 1'b0;
    grp_mid  = 1'b0;
    grp_slow = 1'b0;
    pos_now  = '0;
    for (int i = 0; i < NP; i++) begin
      hit[i] = (seq_id[i] == IW'(SELF_ID));
      if (hit[i]) pos_now = (IW+1)'(i + 1);
      if (i + 1 <= 2 * M)                          grp_fast = grp_fast | hit[i];
      else if (i + 1 <= N - M - 1)                 grp_mid  = grp_mid  | hit[i];
      else                                         grp_slow = grp_slow | hit[i];
    end
  end

  always_ff @(posedge clk_hf or negedge rst_n) begin
    if (!rst_n) begin
      id_m1   <= '0;
      id_2m   <= '0;
      id_2m1  <= '0;
      en_m1   <= 1'b0;
      en_2m   <= 1'b0;
      en_2m1  <= 1'b0;
      own_pos <= '0;
    end else if (line_a) begin
      id_m1   <= seq_id[M];          // (m+1)th position
      id_2m   <= seq_id[2*M-1];      // (2m)th position
      id_2m1  <= seq_id[2*M];        // (2m+1)th position
      en_m1   <= grp_slow;
      en_2m   <= grp_mid;
      en_2m1  <= grp_fast;
      own_pos <= pos_now;
    end
  end

  // The three multiplexers; an ID beyond n selects nothing.
  assign mux_m1  = en_m1  && (int'(id_m1)  < N) && c_in[id_m1];
  assign mux_2m  = en_2m  && (int'(id_2m)  < N) && c_in[id_2m];
  assign mux_2m1 = en_2m1 && (int'(id_2m1) < N) && c_in[id_2m1];
  assign ref_sig = mux_m1 | mux_2m | mux_2m1;

  always_comb begin
    if (en_m1)       begin rule = RULE_SLOW; ref_id = id_m1;  end
    else if (en_2m1) begin rule = RULE_FAST; ref_id = id_2m1; end
    else if (en_2m)  begin rule = RULE_MID;  ref_id = id_2m;  end
    else             begin rule = RULE_NONE; ref_id = '0;     end
  end

  initial begin
    assert (M >= 1 && N > 3 * M)
      else $error("ref_selector: needs m >= 1 and n > 3m");
  end

endmodule
