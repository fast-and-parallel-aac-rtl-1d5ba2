// win_ov: windowing and overlap-add stage of the filter bank (WIN_OV,
// Fig. 13), for long-window frames.
//
// The 2048 IMDCT outputs z[] of a frame are read from the IMDCT RAM. Output
// sample n (0..1023) is z[n] * w_rise[n] + OV[n], where w_rise is the rising
// half of the previous frame's window shape (Win_P REG) and OV holds the
// previous frame's second half. In the same pass OV[n] is replaced by
// z[1024+n] * w_fall[n], the falling half of the current frame's window
// (Win_C REG), w_fall[n] = w[1023-n]. Windows: shape 0 is the sine window
// sin(pi (n + 1/2) / 2048), shape 1 the Kaiser-Bessel derived window with
// alpha = 4 (AAC definitions), both as Q31 ROMs of 1024 words computed at
// elaboration. Products are 32 x 32 bits, kept at the input's scale.
//
// Timing: two cycles per output sample (first cycle reads z[n] and OV[n],
// the second outputs the sample and reads z[1024+n], whose windowed value
// is written to OV in the next cycle), 2049 cycles per frame; out_valid
// marks each of the 1024 output samples, in order.
//
// One core unit decodes two streams in turn, so the overlap RAM keeps one
// 1024-word half per stream slot and Win_P is kept per slot; this is this
// design's choice, as the document does not say where the second stream's
// overlap state lives. After reset a slot's first frame overlaps with
// zeros. Short windows and the long start/stop windows, which
// need the 128-point KBD/sine ROMs of Fig. 13, are not built here: their
// frames are processed as long windows.
module win_ov
  import aac_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     slot,
  input  logic                     win_shape,
  output logic                     busy,
  output logic                     done,
  output logic [10:0]              z_raddr,
  input  logic signed [DATA_W-1:0] z_rdata,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);
  logic signed [31:0] sine_rom [1024];
  logic signed [31:0] kbd_rom  [1024];

  function automatic real bessel_i0(real x);
    real s, t;
    s = 1.0; t = 1.0;
    for (int k = 1; k < 50; k++) begin
      t = t * (x / (2.0 * k));
      s = s + t * t;
    end
    return s;
  endfunction

  function automatic logic signed [31:0] to_q31(real v);
    real r;
    r = v * 2147483648.0 + 0.5;
    if (r > 2147483647.0) r = 2147483647.0;
    return 32'($rtoi(r));
  endfunction

  initial begin
    real pi, alpha, total, acc;
    real wk [1025];
    pi = 3.14159265358979;
    alpha = 4.0;
    total = 0.0;
    for (int j = 0; j <= 1024; j++) begin
      real u;
      u = (j - 512.0) / 512.0;
      wk[j] = bessel_i0(pi * alpha * $sqrt(1.0 - u * u));
      total = total + wk[j];
    end
    acc = 0.0;
    for (int n = 0; n < 1024; n++) begin
      acc = acc + wk[n];
      kbd_rom[n]  = to_q31($sqrt(acc / total));
      sine_rom[n] = to_q31($sin(pi * (n + 0.5) / 2048.0));
    end
  end

  typedef enum logic [1:0] {S_IDLE, S_A, S_B, S_LAST} state_t;
  state_t       state;
  logic [10:0]  n;
  logic [9:0]   n_prev;
  logic         wr_pending;       // z[1024+n_prev] arrives this cycle
  logic         win_p [2];        // Win_P REG, per stream slot
  logic         win_c;            // Win_C REG
  logic         primed [2];       // the slot's OV half holds a frame
  logic         slot_q;

  // OV RAM: 2 slots x 1024 words
  logic        ov_we;
  logic [10:0] ov_waddr, ov_raddr;
  logic signed [DATA_W-1:0] ov_wdata, ov_rdata;
  core_ram #(.WIDTH(DATA_W), .DEPTH(2048)) u_ov_ram (
    .clk, .we(ov_we), .waddr(ov_waddr), .wdata(ov_wdata), .raddr(ov_raddr), .rdata(ov_rdata));

  function automatic logic signed [DATA_W-1:0] wmul(logic signed [DATA_W-1:0] a, logic signed [31:0] w);
    logic signed [63:0] p;
    p = (64'(a) * 64'(w) + 64'sd1073741824) >>> 31;
    return DATA_W'(p);
  endfunction

  logic signed [31:0] w_rise, w_fall;
  always_comb begin
    w_rise = win_p[slot_q] ? kbd_rom[n[9:0]] : sine_rom[n[9:0]];
    w_fall = win_c ? kbd_rom[10'd1023 - n_prev] : sine_rom[10'd1023 - n_prev];
  end

  always_comb begin
    z_raddr   = (state == S_B) ? (11'd1024 + n) : n;
    ov_raddr  = {slot_q, n[9:0]};
    ov_we     = wr_pending;
    ov_waddr  = {slot_q, n_prev};
    ov_wdata  = wmul(z_rdata, w_fall);
    out_valid = (state == S_B);
    out_data  = wmul(z_rdata, w_rise) + (primed[slot_q] ? ov_rdata : '0);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; n <= '0; n_prev <= '0; wr_pending <= 1'b0;
      win_p[0] <= 1'b0; win_p[1] <= 1'b0; primed[0] <= 1'b0; primed[1] <= 1'b0; win_c <= 1'b0; slot_q <= 1'b0; done <= 1'b0;
    end else begin
      done       <= 1'b0;
      wr_pending <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          slot_q <= slot; win_c <= win_shape; n <= '0; state <= S_A;
        end
        S_A: state <= S_B;
        S_B: begin
          wr_pending <= 1'b1;
          n_prev     <= n[9:0];
          if (n == 11'd1023) state <= S_LAST;
          else begin n <= n + 11'd1; state <= S_A; end
        end
        S_LAST: begin
          win_p[slot_q]  <= win_c;
          primed[slot_q] <= 1'b1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
