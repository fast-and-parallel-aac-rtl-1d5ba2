// tb_pcm_converter: checks rounding and 16-bit clipping of the PCM converter
// against an integer model, for corner values and random samples.
module tb_pcm_converter;
  logic signed [31:0] sample_in, pcm_out;
  logic clipped;
  int checks = 0, failures = 0;

  pcm_converter dut (.sample_in, .pcm_out, .clipped);

  task automatic check(input logic signed [31:0] v);
    longint r, e;
    r = (longint'(v) + 8192) >>> 14;
    e = r > 32767 ? 32767 : (r < -32768 ? -32768 : r);
    sample_in = v;
    #1;
    checks++;
    if (longint'(pcm_out) != e || clipped != (e != r)) begin
      failures++;
      $display("FAIL in=%0d out=%0d exp=%0d clipped=%0b", v, pcm_out, e, clipped);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(8191); check(8192); check(-8192); check(-8193);
    check(32767 <<< 14); check((32767 <<< 14) + 8192); check(-32768 <<< 14);
    check((-32768 <<< 14) - 8193); check(32'sh7fffffff); check(32'sh80000000);
    for (int i = 0; i < 2000; i++) check($signed($urandom()) >>> ($urandom_range(0, 16)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
