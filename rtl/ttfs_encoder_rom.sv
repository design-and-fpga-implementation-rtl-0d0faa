// ttfs_encoder_rom: baseline time-to-first-spike encoder with a threshold ROM.
//
// The state-of-the-art TTFS encoder that the shift-and-add design replaces, kept for
// comparison. It has the same two parts as ttfs_encoder, but the decaying threshold
// theta*exp(-t/tau_th) comes from a 40 x 16-bit ROM of precomputed values instead of
// an exponential unit:
//   - a step counter addresses the ROM; the threshold is registered and compared
//     with the sample (spike if the sample is larger);
//   - a refractory register, cleared at the start of each sample and raised by T_REF
//     steps on every spike, is compared with the counter and gates the spike (AND).
// With T_REF beyond the window (the default) there is at most one spike per sample.
//
// ROM contents: round(32768 * exp(-k/8)) for k = 0..39 (tau_th = 8 steps, Q1.15),
// the same threshold ttfs_encoder approximates, so the two can be compared directly.
//
// Timing and interface are those of ttfs_encoder: start (ignored while busy)
// latches data; step k = 0..39 is evaluated in clock k+1 after start with step_valid
// high and step = k; done marks the last step, so a sample takes 40 clocks.
// From the document: counter, ROM, threshold register, two comparators, AND gate and
// the T_ref adder/mux/register loop, and the 40-entry table. This design's choice:
// tau_th, T_REF, the 16-bit Q1.15 entries and the handshake.
module ttfs_encoder_rom #(
  parameter int unsigned T_WINDOW = 40,
  parameter logic [6:0]  T_REF    = 7'd40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  encoder_pkg::sample_t data,
  output logic                 spike,
  output logic                 step_valid,
  output logic [5:0]           step,
  output logic                 done,
  output logic                 busy
);
  import encoder_pkg::*;

  sample_t     data_q;
  logic [5:0]  addr;      // ROM address: step of the next threshold
  logic [15:0] rom_q;     // threshold register (registered ROM output)
  logic [6:0]  refr_q;    // refractory register (one guard bit)
  logic        fire_ok, above;
  logic [5:0]  rd_addr;

  assign rd_addr    = (start && !busy) ? 6'd0 : addr;
  assign above      = data_q > rom_q;
  assign fire_ok    = {1'b0, step} >= refr_q;
  assign step_valid = busy;
  assign spike      = busy && above && fire_ok;
  assign done       = busy && (step == 6'(T_WINDOW - 1));

  // 40 x 16 threshold ROM with registered output; addresses past the table read 0
  always_ff @(posedge clk) begin
    case (rd_addr)
      6'd0 : rom_q <= 16'h8000;
      6'd1 : rom_q <= 16'h70F6;
      6'd2 : rom_q <= 16'h63B0;
      6'd3 : rom_q <= 16'h57F9;
      6'd4 : rom_q <= 16'h4DA3;
      6'd5 : rom_q <= 16'h4483;
      6'd6 : rom_q <= 16'h3C77;
      6'd7 : rom_q <= 16'h355C;
      6'd8 : rom_q <= 16'h2F17;
      6'd9 : rom_q <= 16'h298E;
      6'd10: rom_q <= 16'h24AC;
      6'd11: rom_q <= 16'h205D;
      6'd12: rom_q <= 16'h1C90;
      6'd13: rom_q <= 16'h1934;
      6'd14: rom_q <= 16'h163E;
      6'd15: rom_q <= 16'h13A1;
      6'd16: rom_q <= 16'h1153;
      6'd17: rom_q <= 16'h0F4A;
      6'd18: rom_q <= 16'h0D7E;
      6'd19: rom_q <= 16'h0BE8;
      6'd20: rom_q <= 16'h0A82;
      6'd21: rom_q <= 16'h0946;
      6'd22: rom_q <= 16'h082F;
      6'd23: rom_q <= 16'h0739;
      6'd24: rom_q <= 16'h065F;
      6'd25: rom_q <= 16'h05A0;
      6'd26: rom_q <= 16'h04F7;
      6'd27: rom_q <= 16'h0461;
      6'd28: rom_q <= 16'h03DE;
      6'd29: rom_q <= 16'h0369;
      6'd30: rom_q <= 16'h0303;
      6'd31: rom_q <= 16'h02A8;
      6'd32: rom_q <= 16'h0258;
      6'd33: rom_q <= 16'h0212;
      6'd34: rom_q <= 16'h01D3;
      6'd35: rom_q <= 16'h019C;
      6'd36: rom_q <= 16'h016C;
      6'd37: rom_q <= 16'h0141;
      6'd38: rom_q <= 16'h011B;
      6'd39: rom_q <= 16'h00FA;
      default: rom_q <= 16'h0000;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      data_q <= '0;
      addr   <= '0;
      refr_q <= '0;
      step   <= '0;
    end else if (start && !busy) begin
      busy   <= 1'b1;
      data_q <= data;
      addr   <= 6'd1;
      refr_q <= '0;             // mux input 0: new sample
      step   <= '0;
    end else if (busy) begin
      addr <= addr + 1'b1;
      if (spike) refr_q <= refr_q + T_REF;
      step <= step + 1'b1;
      if (done) busy <= 1'b0;
    end
  end
endmodule
