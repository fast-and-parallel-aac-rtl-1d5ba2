// tb_win_ov: windowing and overlap-add over four frames on two stream slots
// with changing window shapes. The expected output of frame f on slot s is
// z_f[n] w_prev(n) + z_{f-1}[1024+n] w_cur_of_{f-1}(1023-n), with the sine
// and KBD (alpha 4) windows computed here in floating point and the previous
// frame taken from the same slot (zero before the slot's first frame).
// Also checks 1024 outputs per frame and 2 cycles per sample.
module tb_win_ov;
  import aac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, slot, win_shape, busy, done, out_valid;
  logic [10:0] z_raddr;
  logic signed [DATA_W-1:0] z_rdata, out_data;
  int checks = 0, failures = 0;
  int z [2048];
  int zprev [2][2048];
  bit have_prev [2];
  bit shape_prev [2];
  real wsin [1024], wkbd [1024];
  int nout;
  real got [1024];

  win_ov dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) z_rdata <= z[z_raddr];
  always @(posedge clk) if (out_valid) begin got[nout] = real'(out_data); nout++; end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real i0(real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 60; k++) begin t = t * x / (2.0 * k); s += t * t; end
    return s;
  endfunction

  task automatic run(input bit s, input bit shp);
    int cyc;
    for (int n = 0; n < 2048; n++) z[n] = $urandom_range(0, 2000000) - 1000000;
    nout = 0;
    slot = s; win_shape = shp;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
    checks++;
    if (nout != 1024 || cyc > 2 * 1024 + 4) begin
      failures++; $display("FAIL outputs %0d cycles %0d", nout, cyc);
    end
    for (int n = 0; n < 1024; n++) begin
      real e, wr, wf;
      wr = shape_prev[s] ? wkbd[n] : wsin[n];
      e = z[n] * wr;
      if (have_prev[s]) begin
        wf = shape_prev[s] ? wkbd[1023 - n] : wsin[1023 - n];
        e += zprev[s][1024 + n] * wf;
      end
      checks++;
      if ((got[n] - e) > 3.0 || (e - got[n]) > 3.0) begin
        failures++;
        if (failures < 8) $display("FAIL slot %0d n %0d got %f exp %f", s, n, got[n], e);
      end
    end
    zprev[s] = z;
    have_prev[s] = 1;
    shape_prev[s] = shp;
    $display("WIN_OV frame slot %0d shape %0d: %0d cycles", s, shp, cyc);
  endtask

  initial begin
    real tot, acc, wk [1025];
    tot = 0;
    for (int j = 0; j <= 1024; j++) begin
      real u; u = (j - 512.0) / 512.0;
      wk[j] = i0(3.14159265358979323846 * 4.0 * $sqrt(1.0 - u * u)); tot += wk[j];
    end
    acc = 0;
    for (int n = 0; n < 1024; n++) begin
      acc += wk[n];
      wkbd[n] = $sqrt(acc / tot);
      wsin[n] = $sin(3.14159265358979323846 * (n + 0.5) / 2048.0);
    end
    start = 0; slot = 0; win_shape = 0;
    have_prev = '{0, 0}; shape_prev = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 0);
    run(1, 1);
    run(0, 1);
    run(1, 0);
    run(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
