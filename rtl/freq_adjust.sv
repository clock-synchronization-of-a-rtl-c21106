// freq_adjust -- Block D: phase detector, low-pass filter and controlled oscillator.
// BEHAVIOURAL MODEL. In the published circuit this block is analog: a phase detector whose
// error voltage is low-pass filtered and steers a voltage controlled oscillator. This model
// gives the same function in discrete time on the high-frequency clock so that the whole
// network can be simulated; it stands in for the analog part and is not meant to be taped out.
//
// Oscillator: a fixed-point phase accumulator advances by (1 + DRIFT/2^FB + freq_corr/2^FB)
// clk_hf periods per clk_hf period; each time it passes CNT_MOD a tick starts, so the nominal
// local period is CNT_MOD clk_hf periods and DRIFT models the free-running frequency error of
// this particular oscillator. The local clock c_s is high for TICK_W clk_hf periods after each
// tick; `tick` is a one-period pulse on the first of them.
// Phase detector: measures, in clk_hf periods, how late the own tick is against the rising edge
// of the reference (negative when early). An edge that finds no partner within CNT_MOD/2
// periods is dropped.
// Filter: on each measurement the phase is advanced by err/2^KP_SHIFT periods, and a leaky
// integrator (a first-order low-pass) updates the frequency word:
//   freq_corr <= freq_corr - freq_corr/2^LEAK_SHIFT + err*2^FB/2^KI_SHIFT.
// The leak keeps the frequency word bounded. This matters in a network: the reference rule
// pulls three of the five positions of a 5-input node towards earlier clocks and only two
// towards later ones, so a pure integrator in every node would let the common frequency run
// away, while a low-pass filter lets it settle close to the oscillators' own frequencies.
// The default integral gain is kept small (1/16 of a period per period of error): the phase
// steps do most of the work, and the integrator only trims a constant frequency offset.
// Like a real VCO the model has a limited tuning range: the frequency word saturates at
// +-RANGE/2^FB of nominal (1/8 by default), which also keeps the local period well above
// CNT_MOD/2 so that the node's gcc boundary keeps occurring.
// INIT_PHASE sets the phase at reset, so that clocks start out of step.
module freq_adjust #(
  parameter int CNT_MOD    = 33,   // nominal local period in clk_hf periods (T_gcc / T_hf)
  parameter int FB         = 8,    // fractional bits of the phase accumulator
  parameter int DRIFT      = 0,    // free-running frequency error, 1/2^FB of nominal per unit
  parameter int INIT_PHASE = 0,    // phase at reset, in clk_hf periods
  parameter int TICK_W     = 2,    // width of the local clock pulse, clk_hf periods
  parameter int KP_SHIFT   = 1,    // proportional gain 1/2^KP_SHIFT
  parameter int KI_SHIFT   = 12,   // integral gain 2^FB/2^KI_SHIFT per period of error
  parameter int LEAK_SHIFT = 3,    // leak of the integrator, 1/2^LEAK_SHIFT per measurement
  parameter int RANGE      = 32    // tuning range of the frequency word, 1/2^FB units
) (
  input  logic        clk_hf,
  input  logic        rst_n,
  input  logic        ref_sig,     // reference signal from Block C
  output logic        c_s,         // local clock
  output logic        tick,        // first clk_hf period of each local clock pulse
  output logic signed [15:0] phase_err,  // last measured error, clk_hf periods (+ = late)
  output logic        err_valid    // phase_err updated in this period
);

  localparam int MODF = CNT_MOD << FB;
  localparam int HALF = CNT_MOD / 2;

  int   acc;          // phase, in 1/2^FB clk_hf periods, 0 .. MODF-1
  int   freq_corr;    // integral path of the filter
  int   hi_cnt;       // remaining high periods of c_s
  logic ref_q;        // previous sample of the reference
  logic wait_ref;     // own tick seen, waiting for the reference
  logic wait_own;     // reference seen, waiting for the own tick
  int   wcnt;         // periods since the first edge of a pair

  logic ref_rise;
  int   err_now;
  logic err_now_v;
  int   nxt;
  logic wrap;
  int   fc_next;

  // Low-pass filter with a saturating output (the oscillator's tuning range).
  always_comb begin
    fc_next = freq_corr - (freq_corr >>> LEAK_SHIFT) + ((err_now * (1 << FB)) >>> KI_SHIFT);
    if (fc_next > RANGE)  fc_next = RANGE;
    if (fc_next < -RANGE) fc_next = -RANGE;
  end

  assign ref_rise = ref_sig && !ref_q;

  // Phase detector: pair the reference edge with the own tick.
  always_comb begin
    err_now   = 0;
    err_now_v = 1'b0;
    if (ref_rise && tick) begin
      err_now_v = 1'b1;
    end else if (ref_rise && wait_ref) begin
      err_now   = -wcnt;
      err_now_v = 1'b1;
    end else if (tick && wait_own) begin
      err_now   = wcnt;
      err_now_v = 1'b1;
    end
  end

  // Oscillator: next phase with the proportional correction applied.
  always_comb begin
    nxt = acc + (1 << FB) + DRIFT + freq_corr;
    if (err_now_v) nxt = nxt + ((err_now * (1 << FB)) >>> KP_SHIFT);
    wrap = 1'b0;
    if (nxt >= MODF) begin
      nxt  = nxt - MODF;
      wrap = 1'b1;
    end else if (nxt < 0) begin
      nxt = 0;
    end
  end

  always_ff @(posedge clk_hf or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= (INIT_PHASE % CNT_MOD) << FB;
      freq_corr <= 0;
      hi_cnt    <= 0;
      c_s       <= 1'b0;
      tick      <= 1'b0;
      ref_q     <= 1'b0;
      wait_ref  <= 1'b0;
      wait_own  <= 1'b0;
      wcnt      <= 0;
      phase_err <= '0;
      err_valid <= 1'b0;
    end else begin
      acc   <= nxt;
      ref_q <= ref_sig;
      tick  <= wrap;
      if (wrap) begin
        c_s    <= 1'b1;
        hi_cnt <= TICK_W - 1;
      end else if (hi_cnt > 0) begin
        hi_cnt <= hi_cnt - 1;
      end else begin
        c_s <= 1'b0;
      end

      err_valid <= err_now_v;
      if (err_now_v) begin
        phase_err <= 16'(err_now);
        freq_corr <= fc_next;
        wait_ref  <= 1'b0;
        wait_own  <= 1'b0;
        wcnt      <= 0;
      end else if (tick) begin
        wait_ref <= 1'b1;
        wait_own <= 1'b0;
        wcnt     <= 1;
      end else if (ref_rise) begin
        wait_own <= 1'b1;
        wait_ref <= 1'b0;
        wcnt     <= 1;
      end else if (wait_ref || wait_own) begin
        if (wcnt >= HALF) begin
          wait_ref <= 1'b0;
          wait_own <= 1'b0;
          wcnt     <= 0;
        end else begin
          wcnt <= wcnt + 1;
        end
      end
    end
  end

endmodule
