// tb_bosr_sram: self-checking test of a spare SRAM module: random writes and
// reads against a reference array; read data one cycle after the request.
module tb_bosr_sram;
  localparam int D = 16;
  logic clk = 0, rst = 1;
  logic en, we, rvalid;
  logic [3:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [D];
  int checks = 0, failures = 0;

  bosr_sram #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_v;
    logic [7:0] exp_d;
    en = 0; we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < D; i++) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    exp_v = 0; exp_d = '0;
    for (int t = 0; t < 2000; t++) begin
      en = $urandom_range(0, 3) != 0;
      we = $urandom_range(0, 1);
      addr = 4'($urandom);
      wdata = 8'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (rvalid != (en && !we) || (rvalid && rdata != ref_mem[addr])) begin
        failures++; $display("FAIL read at %0t", $time);
      end
      if (en && we) ref_mem[addr] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
