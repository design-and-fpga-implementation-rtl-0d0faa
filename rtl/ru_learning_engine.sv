// ru_learning_engine: R-STDP learning engine of one LSM readout unit.
//
// Spike histories: one HIST-deep shift register per afferent synapse and one for the
// unit's own output. At the end of every time step (hist_shift) each loads its new
// spike bit into the MSB, so bit HIST-1-k holds the spike of k steps ago.
//
// Learning sweep (learn_start): synapses 0..N_PRE-1 are visited one per clock. For
// synapse a the 16:1 mux selects its history and a priority encoder measures the
// timing difference with the output history:
//   - output spiked now (post MSB = 1): the nearest pre spike k steps back gives
//     dt = +k and potentiation;
//   - else the synapse spiked now (pre MSB = 1): the nearest earlier output spike
//     k steps back gives dt = -k and depression;
//   - otherwise no update.
// |dt| indexes the probability LUT, whose value is compared with an LFSR random
// number (ENA = random < probability). The weight is changed by the STDP LUT value,
// added or subtracted according to the sign, only when ENA and the teacher signal ct
// are both high, and clamped to [W_MIN, W_MAX]. The weight memory is a dual-port RAM
// used as a two-stage pipeline (read in one clock, add and write in the next), so one
// synapse is updated per clock and a sweep takes N_PRE+1 clocks.
//
// Temp memory: at iter_end the loss of the iteration is compared with the previous
// one. If loss < previous - LOSS_C the weights are copied into the temp memory (best
// weights so far, N_PRE+1 clocks); otherwise the weights are restored from it
// (N_PRE clocks). The temp memory is cleared by reset.
//
// Other ports: rd_addr/rd_data read a weight (one clock latency) while idle, for the
// integration sweep of the readout unit; load_we/load_addr/load_data write a weight
// while idle. learn_start, iter_end and load_we are accepted only when busy is low.
// upd_pot/upd_dep pulse with each weight write of a potentiation/depression;
// saved/restored pulse when a copy starts.
// From the document: histories, mux, priority encoder, both LUTs, RNG comparison,
// ENA/CT gating, pipelined dual-port weight memory, temp memory and loss comparator.
// This design's choice: LUT contents, weight bounds, the restore direction and the
// one-shift-per-time-step history.
module ru_learning_engine #(
  parameter int unsigned    N_PRE    = lsm_pkg::N_PRE,
  parameter int unsigned    HIST     = lsm_pkg::HIST,
  parameter int             W_MIN    = -2048,
  parameter int             W_MAX    = 2047,
  parameter logic [15:0]    LOSS_C   = 16'd0,
  parameter logic [15:0]    RNG_SEED = 16'hB5A3,
  localparam int unsigned   AW       = $clog2(N_PRE)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // spike histories
  input  logic                 hist_shift,
  input  logic [N_PRE-1:0]     pre_spikes,
  input  logic                 post_spike,
  // learning
  input  logic                 learn_start,
  input  logic                 ct,
  // weight access while idle
  input  logic [AW-1:0]        rd_addr,
  output lsm_pkg::weight_t     rd_data,
  input  logic                 load_we,
  input  logic [AW-1:0]        load_addr,
  input  lsm_pkg::weight_t     load_data,
  // iteration control
  input  logic                 iter_end,
  input  logic [15:0]          loss,
  output logic                 busy,
  output logic                 upd_pot,
  output logic                 upd_dep,
  output logic                 saved,
  output logic                 restored
);
  import lsm_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_LEARN, S_SAVE, S_RESTORE} state_t;

  state_t             state;
  logic [HIST-1:0]    pre_hist [N_PRE];
  logic [HIST-1:0]    post_hist;
  weight_t            temp_mem [N_PRE];
  logic [15:0]        loss_prev;

  logic [AW:0]        idx;          // issue index 0..N_PRE
  logic               issue;
  logic [AW-1:0]      iaddr;
  logic               s1_valid;
  logic [AW-1:0]      s1_addr;
  dt_t                dt_c, s1_dt;

  logic               we;
  logic [AW-1:0]      waddr, raddr;
  weight_t            wdata, rdata;
  logic [15:0]        rnd;
  logic               ena, enable;
  logic signed [17:0] w_sum;
  weight_t            w_new;

  // index of the first 1 from the MSB (distance in steps back), HIST if none
  function automatic logic [3:0] first_from_msb(input logic [HIST-1:0] v);
    logic [3:0] k;
    k = 4'(HIST);
    for (int i = HIST - 1; i >= 0; i--)
      if (v[HIST-1-i]) k = 4'(i);
    return k;
  endfunction

  assign iaddr = idx[AW-1:0];
  assign issue = (state != S_IDLE) && (idx < (AW+1)'(N_PRE));

  // timing difference of the selected synapse (16:1 mux + priority encoder)
  always_comb begin
    logic [HIST-1:0] pre_sel;
    logic [3:0]      k;
    pre_sel = pre_hist[iaddr];
    k       = '0;
    dt_c    = '0;
    if (post_hist[HIST-1]) begin
      k = first_from_msb(pre_sel);
      dt_c = '{valid: (k < 4'(HIST)), neg: 1'b0, mag: k};
    end else if (pre_sel[HIST-1]) begin
      k = first_from_msb(post_hist);
      dt_c = '{valid: (k < 4'(HIST)), neg: 1'b1, mag: k};
    end
  end

  // stage 1: probability check, add/subtract, clamp
  assign ena    = rnd < prob_lut(s1_dt.mag);
  assign enable = (state == S_LEARN) && s1_valid && s1_dt.valid && ena && ct;
  always_comb begin
    logic signed [17:0] d;
    d     = 18'(stdp_lut(s1_dt.mag));
    w_sum = s1_dt.neg ? (18'(rdata) - d) : (18'(rdata) + d);
    if (w_sum > 18'(W_MAX))      w_new = W_W'(W_MAX);
    else if (w_sum < 18'(W_MIN)) w_new = W_W'(W_MIN);
    else                         w_new = W_W'(w_sum);
  end

  // RAM port multiplexing
  always_comb begin
    we    = 1'b0;
    waddr = load_addr;
    wdata = load_data;
    raddr = issue ? iaddr : rd_addr;
    unique case (state)
      S_IDLE:    we = load_we;
      S_LEARN:   begin we = enable; waddr = s1_addr; wdata = w_new; end
      S_RESTORE: begin we = issue;  waddr = iaddr;   wdata = temp_mem[iaddr]; end
      default:   ;
    endcase
  end

  dp_ram #(.DEPTH(N_PRE), .WIDTH(W_W)) u_wmem (
    .clk, .we, .waddr, .wdata(wdata), .raddr, .rdata(rdata)
  );
  assign rd_data = rdata;

  lfsr16_fib #(.SEED(RNG_SEED)) u_rng (
    .clk, .rst_n, .en(state == S_LEARN && s1_valid), .q(rnd)
  );

  assign busy     = (state != S_IDLE);
  assign upd_pot  = enable && !s1_dt.neg;
  assign upd_dep  = enable && s1_dt.neg;

  // spike histories
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      post_hist <= '0;
      for (int i = 0; i < N_PRE; i++) pre_hist[i] <= '0;
    end else if (hist_shift) begin
      post_hist <= {post_spike, post_hist[HIST-1:1]};
      for (int i = 0; i < N_PRE; i++) pre_hist[i] <= {pre_spikes[i], pre_hist[i][HIST-1:1]};
    end
  end

  // sequencer
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      s1_valid  <= 1'b0;
      s1_addr   <= '0;
      s1_dt     <= '0;
      loss_prev <= 16'hFFFF;
      saved     <= 1'b0;
      restored  <= 1'b0;
      for (int i = 0; i < N_PRE; i++) temp_mem[i] <= '0;
    end else begin
      saved    <= 1'b0;
      restored <= 1'b0;
      s1_valid <= issue;
      s1_addr  <= iaddr;
      s1_dt    <= dt_c;
      if (state == S_SAVE && s1_valid) temp_mem[s1_addr] <= rdata;
      unique case (state)
        S_IDLE: begin
          idx <= '0;
          if (learn_start) state <= S_LEARN;
          else if (iter_end) begin
            loss_prev <= loss;
            if (17'(loss) + 17'(LOSS_C) < 17'(loss_prev)) begin
              state <= S_SAVE;
              saved <= 1'b1;
            end else begin
              state    <= S_RESTORE;
              restored <= 1'b1;
            end
          end
        end
        S_LEARN, S_SAVE: begin
          if (issue) idx <= idx + 1'b1;
          else       state <= S_IDLE;       // last pipeline stage done
        end
        S_RESTORE: begin
          if (idx == (AW+1)'(N_PRE - 1)) state <= S_IDLE;
          else                           idx   <= idx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
