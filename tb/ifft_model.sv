// ifft_model: behavioural stand-in for the external complex IFFT core used
// by the IMDCT (not synthesizable; testbench use only).
//
// It collects 512 (short = 0) or 64 (short = 1) complex inputs streamed with
// in_valid in natural order, and on `start` computes the unscaled inverse
// DFT x[n] = sum_k X[k] exp(+j 2 pi k n / N) in double precision, rounds it
// and, LATENCY cycles later, streams the N outputs in natural order, one per
// cycle with out_valid.
module ifft_model #(
  parameter int LATENCY = 20
) (
  input  logic               clk,
  input  logic               short_sz,
  input  logic               in_valid,
  input  logic signed [31:0] in_re,
  input  logic signed [31:0] in_im,
  input  logic               start,
  output logic               out_valid,
  output logic signed [31:0] out_re,
  output logic signed [31:0] out_im
);
  real xr [512], xi [512], yr [512], yi [512];
  int  n_in = 0;
  int  n_out = 0;
  int  wait_cnt = -1;
  int  npts = 512;

  always @(posedge clk) begin
    out_valid <= 1'b0;
    if (in_valid) begin
      xr[n_in % 512] = real'(in_re);
      xi[n_in % 512] = real'(in_im);
      n_in++;
    end
    if (start) begin
      npts = short_sz ? 64 : 512;
      for (int n = 0; n < npts; n++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int k = 0; k < npts; k++) begin
          real a;
          a  = 2.0 * 3.14159265358979323846 * ((k * n) % npts) / npts;
          sr += xr[k] * $cos(a) - xi[k] * $sin(a);
          si += xr[k] * $sin(a) + xi[k] * $cos(a);
        end
        yr[n] = sr; yi[n] = si;
      end
      n_in = 0;
      wait_cnt = LATENCY;
      n_out = 0;
    end else if (wait_cnt > 0) begin
      wait_cnt--;
    end else if (wait_cnt == 0) begin
      out_valid <= 1'b1;
      out_re <= 32'($rtoi(yr[n_out] + (yr[n_out] >= 0 ? 0.5 : -0.5)));
      out_im <= 32'($rtoi(yi[n_out] + (yi[n_out] >= 0 ? 0.5 : -0.5)));
      n_out++;
      if (n_out == npts) wait_cnt = -1;
    end
  end
endmodule
