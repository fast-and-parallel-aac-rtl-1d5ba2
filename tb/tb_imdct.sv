// tb_imdct: runs the IMDCT on random spectra, long window and eight short
// windows, with the behavioural IFFT model, and compares every output with
// the textbook IMDCT y[n] = G * sum_k X[k] cos(2 pi/N (n + n0)(k + 1/2)),
// n0 = (N/2 + 1)/2, in floating point. G = GAIN_K is the gain of the
// FFT-based factorization with unit twiddles. Also checks the number of
// outputs and the cycle count of each stage sequence.
module tb_imdct;
  import aac_pkg::*;
  localparam real GAIN_K = 1.0;   // unit twiddles, unscaled IFFT: the sum itself
  logic clk = 0, rst_n = 0;
  logic start, win_short, busy, done;
  logic [9:0] iq_raddr;
  logic signed [DATA_W-1:0] iq_rdata;
  logic ifft_short, ifft_in_valid, ifft_start, ifft_out_valid;
  logic signed [DATA_W-1:0] ifft_in_re, ifft_in_im, ifft_out_re, ifft_out_im;
  logic out_we;
  logic [10:0] out_addr;
  logic signed [DATA_W-1:0] out_data;
  int checks = 0, failures = 0, nout = 0;
  int X [1024];
  int Y [2048];
  real maxerr, maxref;

  imdct dut (.*);
  ifft_model #(.LATENCY(20)) u_ifft (.clk, .short_sz(ifft_short), .in_valid(ifft_in_valid),
    .in_re(ifft_in_re), .in_im(ifft_in_im), .start(ifft_start),
    .out_valid(ifft_out_valid), .out_re(ifft_out_re), .out_im(ifft_out_im));
  always #5 clk = ~clk;
  always @(posedge clk) iq_rdata <= X[iq_raddr];
  always @(posedge clk) if (out_we) begin Y[out_addr] <= out_data; nout <= nout + 1; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit shortw);
    int cyc, nn, nw;
    for (int k = 0; k < 1024; k++) X[k] = $urandom_range(0, 2000000) - 1000000;
    nout = 0;
    win_short = shortw;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
    checks++;
    if (nout != 2048) begin failures++; $display("FAIL outputs %0d", nout); end
    nn = shortw ? 256 : 2048;
    nw = shortw ? 8 : 1;
    maxerr = 0; maxref = 0;
    for (int w = 0; w < nw; w++)
      for (int n = 0; n < nn; n++) begin
        real s, e;
        s = 0;
        for (int k = 0; k < nn / 2; k++)
          s += X[w * nn / 2 + k] * $cos(2.0 * 3.14159265358979323846 / nn * (n + (nn / 2.0 + 1.0) / 2.0) * (k + 0.5));
        s = s * GAIN_K;
        e = Y[w * nn + n] - s;
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        if ((s < 0 ? -s : s) > maxref) maxref = (s < 0 ? -s : s);
        checks++;
        if (e > 64.0 + 1.0e-5 * (s < 0 ? -s : s)) begin
          failures++;
          if (failures < 8) $display("FAIL w=%0d n=%0d got %0d exp %f", w, n, Y[w * nn + n], s);
        end
      end
    $display("IMDCT %s: %0d cycles, max error %f of max %f", shortw ? "8 short" : "long", cyc, maxerr, maxref);
  endtask

  initial begin
    start = 0; win_short = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
