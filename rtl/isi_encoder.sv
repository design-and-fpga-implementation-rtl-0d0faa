// isi_encoder: inter-spike-interval (burst) spike-train generator.
//
// A normalised sample A (0..1) becomes a burst of Ns(A) = ceil(NMAX*A) spikes
// spaced ISI(A) = ceil(TMAX - (TMAX-TMIN)*A) steps apart (TMAX when Ns <= 1), so a
// larger sample gives more and denser spikes. NMAX and TMAX-TMIN are powers of two,
// so both formulas are shifts, an add and a truncation. An interval counter
// (add 1, compare for equality with ISI, restart at 0) places the spikes and a spike
// counter stops them once Ns have been emitted. Spikes that would fall after the
// last step of the WINDOW-step train are not generated.
//
// Timing: start (ignored while busy) computes Ns and ISI in its clock; steps
// t = 1..WINDOW follow in the next WINDOW clocks with step_valid high and spike set at
// t = ISI, 2*ISI, ... (at most Ns). train collects them, bit WINDOW-1 = step 1, and is
// complete after the clock where done is high: 17 clocks per sample by default.
// The sample is unsigned Q1.15 (16'h8000 = 1.0); larger values are clipped to 1.0.
// From the document: equations, shifts, the three counter/comparator groups and the
// 17-cycle latency. This design's choice: NMAX, TMAX, TMIN and the window truncation.
module isi_encoder #(
  parameter int unsigned WINDOW = 16,
  parameter int unsigned NMAX   = 8,
  parameter int unsigned TMAX   = 6,
  parameter int unsigned TMIN   = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  encoder_pkg::sample_t data,
  output logic                 spike,
  output logic                 step_valid,
  output logic [WINDOW-1:0]    train,
  output logic [4:0]           ns,
  output logic [7:0]           isi,
  output logic                 done,
  output logic                 busy
);
  import encoder_pkg::*;
  localparam int unsigned NMAX_SH = $clog2(NMAX);
  localparam int unsigned DIFF_SH = $clog2(TMAX - TMIN);
  localparam int unsigned STEP_W  = $clog2(WINDOW + 1);

  initial begin
    assert (NMAX == (1 << NMAX_SH)) else $error("NMAX must be a power of two");
    assert ((TMAX - TMIN) == (1 << DIFF_SH)) else $error("TMAX-TMIN must be a power of two");
  end

  sample_t           a;
  logic [31:0]       a_n, a_d;
  logic [4:0]        ns_c;
  logic [7:0]        isi_c;
  logic [7:0]        ic, ic_inc;
  logic [4:0]        nspk;
  logic [STEP_W-1:0] t;
  logic              match;

  // Ns(A) and ISI(A) by shift, add and truncation
  always_comb begin
    a     = (data > Q15_ONE) ? Q15_ONE : data;
    a_n   = 32'(a) << NMAX_SH;                       // NMAX*A, Q.15
    a_d   = 32'(a) << DIFF_SH;                       // (TMAX-TMIN)*A, Q.15
    ns_c  = 5'((a_n + 32'h7FFF) >> 15);              // ceil
    isi_c = (a_n > 32'(Q15_ONE)) ? 8'(TMAX - (a_d >> 15)) : 8'(TMAX);
  end

  assign ic_inc     = ic + 8'd1;
  assign match      = (ic_inc == isi);
  assign step_valid = busy;
  assign spike      = busy && match && (nspk < ns);
  assign done       = busy && (t == STEP_W'(WINDOW));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ns    <= '0;
      isi   <= '0;
      ic    <= '0;
      nspk  <= '0;
      t     <= '0;
      train <= '0;
    end else if (start && !busy) begin
      busy  <= 1'b1;
      ns    <= ns_c;
      isi   <= isi_c;
      ic    <= '0;
      nspk  <= '0;
      t     <= STEP_W'(1);
      train <= '0;
    end else if (busy) begin
      ic    <= match ? 8'd0 : ic_inc;
      if (spike) nspk <= nspk + 5'd1;
      train <= {train[WINDOW-2:0], spike};
      t     <= t + 1'b1;
      if (done) busy <= 1'b0;
    end
  end
endmodule
