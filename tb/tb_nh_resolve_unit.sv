// tb_nh_resolve_unit: fills the comparand and address stores with random
// values, then runs lookups of IDs placed in word k, lane l (or absent) with
// random start words and iteration counts. Checks the resolved address, the
// match flag, the default address on a miss, in-progress while searching, and
// the latency: ready 4 cycles after the start for a hit in the first word,
// one more cycle for each further word searched.
module tb_nh_resolve_unit;
  import parser_pkg::*;
  localparam int NC = 8, ND = 16;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [63:0] seg = 0;
  ext_spec_t spec;
  logic [3:0] start_addr = 0, wr_word = 0;
  logic [2:0] iters = 0, wr_lane = 0;
  logic [7:0] default_addr = 0, wr_adr = 0;
  logic cmp_we = 0, adr_we = 0, wr_cmp_valid = 0;
  logic [15:0] wr_cmp = 0;
  logic in_progress, ready, matched;
  logic [7:0] resolved_addr;
  logic [15:0] m_cmp [ND][NC];
  logic [7:0]  m_adr [ND][NC];
  int checks = 0, failures = 0;

  nh_resolve_unit #(.NH_CMP(NC), .NH_DEPTH(ND)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    spec = '{off: 6'd16, len: 5'd16, shl: 3'd0};  // ID in bits 47:32
    repeat (2) @(posedge clk); rst_n = 1;
    // distinct comparands: word*16+lane+0x100
    for (int w = 0; w < ND; w++)
      for (int l = 0; l < NC; l++) begin
        m_cmp[w][l] = 16'(16'h100 + w * 16 + l);
        m_adr[w][l] = 8'($urandom);
        @(negedge clk);
        cmp_we = 1; adr_we = 1; wr_word = 4'(w); wr_lane = 3'(l);
        wr_cmp_valid = 1; wr_cmp = m_cmp[w][l]; wr_adr = m_adr[w][l];
      end
    @(negedge clk); cmp_we = 0; adr_we = 0;
    for (int n = 0; n < 300; n++) begin
      int sw, it, hw, hl, exp_lat, lat;
      bit hit;
      sw = $urandom_range(0, ND - 1);
      it = $urandom_range(1, 7);
      hw = $urandom_range(0, 8);       // word offset of the ID; >= it means miss
      hl = $urandom_range(0, NC - 1);
      hit = (hw < it);
      @(negedge clk);
      start = 1; start_addr = 4'(sw); iters = 3'(it); default_addr = 8'($urandom);
      seg = {$urandom, $urandom};
      seg[47:32] = hit ? m_cmp[(sw + hw) % ND][hl] : 16'hFFFF;
      @(negedge clk);
      start = 0;
      exp_lat = 4 + (hit ? hw : it - 1);
      lat = 1;
      checks++; if (!in_progress || ready) begin failures++; $display("status after start"); end
      while (!ready && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != exp_lat) begin failures++; if (failures < 6) $display("latency %0d exp %0d", lat, exp_lat); end
      checks++;
      if (matched !== hit ||
          resolved_addr !== (hit ? m_adr[(sw + hw) % ND][hl] : default_addr)) begin
        failures++; if (failures < 6) $display("result %h exp hit=%b", resolved_addr, hit);
      end
      checks++; if (in_progress) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
