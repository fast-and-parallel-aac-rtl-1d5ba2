// iq_resc: inverse quantization and rescaling (IQ_RESC, Fig. 10), taking
// the quantized spectrum from SD-RAM and the scale factors from SF-RAM and
// writing rescaled coefficients to IQ-RAM.
//
// Inverse quantization, |x|^(4/3) with the sign of x, is a table lookup:
// for |x| < 1026 the LUT entry is the result; for larger |x| (up to 8191)
// the address is |x| >> 3, entries X1 = LUT[a] and X2 = LUT[a+1] are read
// one after the other and interpolated, 16 * (X1 + ERR[|x| & 7] * (X2 - X1)),
// ERR[i] = i/8 held in the ERR ROM. The LUT holds round(q^(4/3) * 2^14) and
// is split into IQ ROM0 (addresses 0..1023) and IQ ROM1 (1024, 1025) as in
// the figure; its entries are computed at elaboration with an exact integer
// cube root.
// Rescaling by gain = 2^(0.25 (sf - 100)): the exponent sf/4 - 25, minus a
// fixed IMDCT pre-scaling of 7 (long windows) or 4 (short windows), goes to
// EXP_REG and sets a left or right shift (LSL/LSR); the fraction sf & 3, in
// FRC_REG, selects 2^(frac/4) from POW_ROM (Q28) for a final multiply,
// skipped when the fraction is zero. Output format: signed, 14 fraction
// bits, pre-scaled for the IMDCT.
// The constants 1026, 8, 25, 4 and 7 are printed in Fig. 10; the table
// format (14 fraction bits) and POW_ROM precision (Q28) follow the fixed-point
// reference decoder the document used and are this design's reading.
//
// Timing: one coefficient per 4 cycles (5 when interpolating): read RAMs,
// latch (Spec_Reg, EXP_REG, FRC_REG), LUT read X1, [LUT read X2], rescale
// and write. start pulses once; done pulses after coefficient 1023.
module iq_resc
  import aac_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              win_short,
  output logic              busy,
  output logic              done,
  output logic [9:0]        sd_raddr,
  input  logic [SD_W-1:0]   sd_rdata,
  output logic [5:0]        sf_raddr,
  input  logic [SF_W-1:0]   sf_rdata,
  output logic              iq_we,
  output logic [9:0]        iq_waddr,
  output logic [DATA_W-1:0] iq_wdata
);
  localparam int unsigned IQ_TABLE_SIZE = 1026;

  // round(q^(4/3) * 2^14) via an integer cube root of q^4 * 2^45
  function automatic logic [31:0] iq_entry(int unsigned q);
    logic [127:0] v, r, lo, hi, mid;
    v  = (128'(q) * 128'(q) * 128'(q) * 128'(q)) << 45;
    lo = 0; hi = 128'd1 << 35;
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      if (mid * mid * mid <= v) lo = mid; else hi = mid;
    end
    r = (lo + 1) >> 1;
    return r[31:0];
  endfunction

  logic [31:0] iq_rom0 [1024];
  logic [31:0] iq_rom1 [2];
  initial begin
    for (int unsigned q = 0; q < 1024; q++) iq_rom0[q] = iq_entry(q);
    for (int unsigned q = 0; q < 2; q++)    iq_rom1[q] = iq_entry(q + 1024);
  end

  function automatic logic [31:0] err_rom(logic [2:0] i);
    return 32'(i) << 11;       // i/8 with 14 fraction bits
  endfunction

  function automatic logic [31:0] pow_rom(logic [1:0] f);
    case (f)                   // round(2^28 * 2^(f/4))
      2'd0:    return 32'd268435456;
      2'd1:    return 32'd319225354;
      2'd2:    return 32'd379625062;
      default: return 32'd451452825;
    endcase
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_RD, S_LU, S_X1, S_X2, S_RESC} state_t;
  state_t       state;
  logic [10:0]  k;
  logic [5:0]   sfb;
  logic [12:0]  q_abs;      // D register
  logic         neg;
  logic         big;        // |x| >= 1026: interpolate
  logic signed [8:0] exp_q; // EXP_REG
  logic [1:0]   frc_q;      // FRC_REG
  logic [31:0]  x1, x2;
  logic [10:0]  lu_addr;

  function automatic logic [31:0] lut(logic [10:0] a);
    return a[10] ? iq_rom1[a[0]] : iq_rom0[a[9:0]];   // ROM1 / ROM0 mux
  endfunction

  assign busy     = (state != S_IDLE);
  assign sd_raddr = k[9:0];
  assign sf_raddr = sfb;
  assign iq_waddr = k[9:0];
  assign lu_addr  = big ? (11'(q_abs >> 3) + ((state == S_X2) ? 11'd1 : 11'd0)) : 11'(q_abs);

  // interpolation and rescaling datapath
  logic [31:0] iq_mag, shifted, scaled;
  logic [63:0] prod;
  logic [31:0] diff;
  logic [63:0] pw;
  always_comb begin
    diff   = x2 - x1;
    prod   = (64'(err_rom(q_abs[2:0])) * 64'(diff) + 64'd8192) >> 14;
    iq_mag = big ? ((x1 + prod[31:0]) << 4) : x1;
    if (exp_q < 0)
      shifted = (-exp_q >= 32) ? 32'd0 : (iq_mag >> (-exp_q));
    else
      shifted = iq_mag << exp_q;
    pw     = (64'(shifted) * 64'(pow_rom(frc_q)) + (64'd1 << 27)) >> 28;
    scaled = shifted;
    if (frc_q != 2'd0) scaled = pw[31:0];
    iq_wdata = neg ? -scaled : scaled;
  end

  assign iq_we = (state == S_RESC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; k <= '0; sfb <= '0;
      q_abs <= '0; neg <= 1'b0; big <= 1'b0; exp_q <= '0; frc_q <= '0;
      x1 <= '0; x2 <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin k <= '0; sfb <= '0; state <= S_RD; end
        S_RD:   state <= S_LU;
        S_LU: begin
          logic signed [SD_W-1:0] s;
          logic [15:0] a;
          s = $signed(sd_rdata);
          a = (s < 0) ? 16'(-s) : 16'(s);
          if (a > 16'd8191) a = 16'd8191;
          q_abs <= a[12:0];
          neg   <= (s < 0);
          big   <= (a >= 16'(IQ_TABLE_SIZE));
          exp_q <= $signed({3'b000, sf_rdata[7:2]}) - 9'sd25 - (win_short ? 9'sd4 : 9'sd7);
          frc_q <= sf_rdata[1:0];
          state <= S_X1;
        end
        S_X1: begin
          x1 <= lut(lu_addr);
          x2 <= '0;
          state <= big ? S_X2 : S_RESC;
        end
        S_X2: begin
          x2 <= lut(lu_addr);
          state <= S_RESC;
        end
        S_RESC: begin
          if (k == 11'd1023) begin
            state <= S_IDLE; done <= 1'b1;
          end else begin
            k <= k + 11'd1;
            if (k + 11'd1 == swb_offset_long(sfb + 6'd1) && sfb < 6'(NUM_SWB - 1)) sfb <= sfb + 6'd1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
