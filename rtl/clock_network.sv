// clock_network -- a clustered, fault-tolerant network of phase-locked clocks.
//
// N clocks are grouped into M1 clusters of P1 clocks and M2 clusters of P2 clocks. Every clock
// c_ij (cluster i, member j, numbered from 0 here) receives all clocks of its own cluster and,
// from every other cluster k, its member (i mod p_k). Each clock therefore has
// n_i = M1 + M2 + p_i - 1 inputs, itself included, instead of the N of a fully connected
// network, and every clock drives about the same number of others. Each clock owns a
// synchronization node (sync_node) that runs the phase-locked algorithm on its inputs, with
// F_SPEC the number of faulty clocks each node tolerates; n_i > 3*F_SPEC is required.
// The defaults are the 8-clock network of 4 clusters of 2 clocks whose connection matrix is
// the published example; with M2 > 0 the same module builds the two-size networks.
//
// Clock g is index g of c_out, counted cluster by cluster. For testing fault tolerance the
// link from clock s to clock d can be overridden: when inj_en[s] is high, clock d receives
// inj_val[d][s] instead of c_out[s], so a test can make one clock show different waveforms to
// different receivers (a malicious fault). Tie inj_en low in normal use.
// DRIFT_SPREAD and the index of each clock set the free-running frequency error and start
// phase of the oscillator models in the nodes (drift of clock g is ((g*5) mod 7 - 3)*
// DRIFT_SPREAD/256 of the nominal frequency, start phase (g*13) mod CNT_MOD).
// Timing: all nodes run on clk_hf; c_out are pulses of 2 clk_hf periods, nominally one every
// CNT_MOD periods.
module clock_network
  import clksync_pkg::*;
#(
  parameter int M1           = 4,    // clusters of the first size
  parameter int P1           = 2,    // clocks in each of them
  parameter int M2           = 0,    // clusters of the second size
  parameter int P2           = 1,    // clocks in each of them
  parameter int F_SPEC       = 1,    // faults tolerated by every node
  parameter int CNT_MOD      = 33,   // T_gcc / T_hf
  parameter int DRIFT_SPREAD = 1,    // scale of the oscillator frequency errors
  localparam int N = num_clocks(M1, P1, M2, P2)
) (
  input  logic                  clk_hf,
  input  logic                  rst_n,
  input  logic [N-1:0]          inj_en,    // clock s is replaced on its links
  input  logic [N-1:0][N-1:0]   inj_val,   // [d][s]: what clock d receives from faulty s
  output logic [N-1:0]          c_out,     // the synchronized clocks
  output logic [N-1:0]          ref_out,   // reference chosen by each node
  output logic [N-1:0]          line_a,    // gcc start of each node
  output rule_e [N-1:0]         rule,      // reference rule in force at each node
  output logic [N-1:0][15:0]    phase_err, // phase error measured by each node
  output logic [N-1:0]          err_valid
);

  for (genvar d = 0; d < N; d++) begin : g_node
    localparam int NI   = fan_in(d, M1, P1, M2, P2);
    localparam int SELF = self_pos(d, M1, P1, M2, P2);
    localparam int NPD  = pow2_ceil(NI);
    localparam int IWD  = idx_w(NPD);

    logic [NI-2:0]          c_other;
    logic [NI-1:0]          ticked;
    logic [NPD-1:0][IWD-1:0] seq_id;
    logic [IWD:0]           own_pos;

    // Links into clock d, with the fault-injection override of their source.
    for (genvar k = 0; k < NI - 1; k++) begin : g_link
      localparam int S = nth_source(d, k, M1, P1, M2, P2);
      assign c_other[k] = inj_en[S] ? inj_val[d][S] : c_out[S];
    end

    sync_node #(
      .N(NI), .M(F_SPEC), .SELF_ID(SELF), .CNT_MOD(CNT_MOD),
      .DRIFT((((d * 5) % 7) - 3) * DRIFT_SPREAD),
      .INIT_PHASE((d * 13) % CNT_MOD)
    ) u_node (
      .clk_hf, .rst_n, .c_other,
      .c_s(c_out[d]), .ref_sig(ref_out[d]), .line_a(line_a[d]), .ticked, .seq_id,
      .rule(rule[d]), .own_pos, .phase_err(phase_err[d]), .err_valid(err_valid[d]));
  end

  initial begin
    for (int d = 0; d < N; d++)
      assert (fan_in(d, M1, P1, M2, P2) > 3 * F_SPEC)
        else $error("clock_network: clock %0d has too few inputs for F_SPEC", d);
  end

endmodule
