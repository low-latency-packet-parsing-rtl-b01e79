// tb_branch_catalyst: GRE-style test with three flag bits: all eight flag
// combinations have an entry in set 1, so every value resolves in the same
// cycle; then random tables with missing entries, checked against a search
// of the table kept by the testbench.
module tb_branch_catalyst;
  import parser_pkg::*;
  logic clk = 0;
  logic [63:0] seg = 0;
  ext_spec_t spec;
  logic [1:0] set = 0, wr_set = 0;
  logic [2:0] wr_entry = 0;
  logic we = 0, wr_valid = 0;
  logic [15:0] wr_value = 0;
  logic [7:0] wr_addr = 0;
  logic hit;
  logic [7:0] target;
  bit m_v [4][8]; logic [15:0] m_val [4][8]; logic [7:0] m_adr [4][8];
  int checks = 0, failures = 0;

  branch_catalyst #(.BC_ENTRIES(8), .BC_SETS(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic wr(int s, int e, bit v, logic [15:0] val, logic [7:0] a);
    @(negedge clk); we = 1; wr_set = 2'(s); wr_entry = 3'(e); wr_valid = v; wr_value = val; wr_addr = a;
    m_v[s][e] = v; m_val[s][e] = val; m_adr[s][e] = a;
    @(negedge clk); we = 0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) for (int e = 0; e < 8; e++) wr(s, e, 0, 0, 0);
    // GRE: C, K, S flags are bits 0, 2, 3 of the first byte; take bits 0..3
    for (int e = 0; e < 8; e++) wr(1, 7 - e, 1, 16'(e), 8'(8'h40 + e));
    spec = '{off: 6'd0, len: 5'd3, shl: 3'd0};
    set = 1;
    for (int f = 0; f < 8; f++) begin
      seg = {3'(f), 61'($urandom)};
      #1; checks++;
      if (!hit || target !== 8'(8'h40 + f)) begin failures++; $display("GRE flags %0d -> %h", f, target); end
    end
    // random tables
    for (int n = 0; n < 40; n++) wr($urandom_range(0, 3), $urandom_range(0, 7), $urandom_range(0, 1),
                                    16'($urandom_range(0, 15)), 8'($urandom));
    for (int n = 0; n < 1000; n++) begin
      bit eh; logic [7:0] ea; logic [15:0] f;
      eh = 0; ea = 0;
      set  = 2'($urandom);
      spec = '{off: 6'($urandom_range(0, 60)), len: 5'd4, shl: 3'd0};
      seg  = {$urandom, $urandom};
      f = 16'((seg >> (60 - int'(spec.off))) & 64'hF);
      for (int e = 7; e >= 0; e--) if (m_v[set][e] && m_val[set][e] == f) begin eh = 1; ea = m_adr[set][e]; end
      #1; checks++;
      if (hit !== eh || (eh && target !== ea)) begin
        failures++; if (failures < 6) $display("set %0d f %0d hit %b/%b", set, f, hit, eh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
