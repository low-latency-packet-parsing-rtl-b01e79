// tb_instr_mem: writes random instruction words, then reads them back and
// checks that each appears exactly one clock after its address.
module tb_instr_mem;
  import parser_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, we;
  logic [7:0] waddr, raddr;
  instr_t wdata, instr;
  logic [INSTR_W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  instr_mem #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .instr);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      logic [INSTR_W-1:0] w;
      for (int k = 0; k < (INSTR_W + 31) / 32; k++) w = (w << 32) | INSTR_W'($urandom);
      shadow[i] = w;
      @(negedge clk); we = 1; waddr = 8'(i); wdata = instr_t'(w);
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 600; n++) begin
      int a = $urandom_range(0, DEPTH - 1);
      raddr = 8'(a);
      @(posedge clk); #1;
      checks++;
      if (instr !== instr_t'(shadow[a])) begin
        failures++; if (failures < 5) $display("addr %0d mismatch", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
