// tb_phv_filler: random segments written as 8-, 16- or 32-bit containers at
// random indices over several "packets"; at each 'done' the snapshot on the
// outputs is compared with a container model kept by the testbench, and the
// working vector must start empty for the next packet. A directed case checks
// that a 16-bit segment fills two 8-bit containers in byte order.
module tb_phv_filler;
  import parser_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, done = 0;
  logic [63:0] seg = 0;
  logic [3:0] nbytes = 0;
  phv_mode_e mode = PHV_NONE;
  logic [3:0] idx = 0;
  logic phv_valid;
  logic [7:0]  c8_out [N];
  logic [15:0] c16_out [N];
  logic [31:0] c32_out [N];
  logic [N-1:0] v8_out, v16_out, v32_out;
  logic [7:0] m8 [N]; logic [15:0] m16 [N]; logic [31:0] m32 [N];
  logic [N-1:0] mv8, mv16, mv32;
  int checks = 0, failures = 0;

  phv_filler #(.N_C8(N), .N_C16(N), .N_C32(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic mclear();
    mv8 = 0; mv16 = 0; mv32 = 0;
    for (int i = 0; i < N; i++) begin m8[i] = 0; m16[i] = 0; m32[i] = 0; end
  endtask

  task automatic mwrite();
    int nb = int'(nbytes);
    logic [7:0] bytes [8];
    for (int b = 0; b < 8; b++) bytes[b] = seg[63 - 8*b -: 8];
    case (mode)
      PHV_C8:  for (int b = 0; b < nb; b++) if (idx + b < N) begin m8[idx+b] = bytes[b]; mv8[idx+b] = 1; end
      PHV_C16: for (int k = 0; k < nb / 2; k++) if (idx + k < N) begin
                 m16[idx+k] = {bytes[2*k], bytes[2*k+1]}; mv16[idx+k] = 1; end
      PHV_C32: for (int k = 0; k < nb / 4; k++) if (idx + k < N) begin
                 m32[idx+k] = {bytes[4*k], bytes[4*k+1], bytes[4*k+2], bytes[4*k+3]}; mv32[idx+k] = 1; end
      default: ;
    endcase
  endtask

  task automatic compare();
    checks++;
    if (v8_out !== mv8 || v16_out !== mv16 || v32_out !== mv32) begin
      failures++; $display("valid mismatch %h/%h %h/%h %h/%h", v8_out, mv8, v16_out, mv16, v32_out, mv32);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if ((mv8[i] && c8_out[i] !== m8[i]) || (mv16[i] && c16_out[i] !== m16[i]) ||
          (mv32[i] && c32_out[i] !== m32[i])) begin
        failures++; if (failures < 6) $display("container %0d mismatch", i);
      end
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mclear();
    repeat (2) @(posedge clk); rst_n = 1;
    // directed: 16-bit segment 0xABCD into two 8-bit containers at index 3
    @(negedge clk); wr_en = 1; seg = 64'hABCD_0000_0000_0000; nbytes = 2; mode = PHV_C8; idx = 3; done = 1;
    @(negedge clk); wr_en = 0; done = 0;
    checks++;
    if (!phv_valid || c8_out[3] !== 8'hAB || c8_out[4] !== 8'hCD || v8_out !== 16'h0018) begin
      failures++; $display("directed fill failed");
    end
    for (int p = 0; p < 60; p++) begin
      int len = $urandom_range(1, 10);
      mclear();
      for (int s = 0; s < len; s++) begin
        @(negedge clk);
        wr_en  = ($urandom_range(0, 4) != 0);
        seg    = {$urandom, $urandom};
        nbytes = 4'(2 << $urandom_range(0, 2));
        mode   = phv_mode_e'($urandom_range(0, 3));
        idx    = 4'($urandom);
        done   = (s == len - 1);
        if (wr_en) mwrite();
      end
      @(negedge clk); wr_en = 0; done = 0;
      checks++; if (!phv_valid) begin failures++; $display("no phv_valid"); end
      compare();
      if (p % 10 == 9) begin  // an empty packet must report an empty vector
        @(negedge clk); done = 1;
        @(negedge clk); done = 0;
        checks++; if (v8_out !== 0 || v16_out !== 0 || v32_out !== 0) begin failures++; $display("not cleared"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
