// tb_core_ram: writes random words to random addresses and checks that the
// registered read port returns the last word written, one cycle later.
module tb_core_ram;
  logic clk = 0;
  logic we;
  logic [9:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  core_ram #(.WIDTH(32), .DEPTH(1024)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = $urandom(); model[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      logic [9:0] a;
      @(negedge clk);
      a = 10'($urandom());
      raddr = a;
      we = $urandom_range(0, 1);
      waddr = 10'($urandom());
      wdata = $urandom();
      @(posedge clk);
      #1;
      checks++;
      if (rdata != model[a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", a, rdata, model[a]);
      end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
