// tb_apc: directed scenarios for the Advanced Program Control. Each step sets
// the current instruction and the status inputs, checks the combinational
// decision (next_pc, exec, consume, pkt_done) against the value worked out by
// hand from the priority rules, and clocks once. Covers sequential flow,
// input stall, conditional branch, catalyst hit and miss, header expiry with
// a ready and with a pending next-header lookup (stall in WAIT_NH), the
// return stack of a next-header call and its pop on packet expiry, payload
// forwarding limited by the packet counter, counter priority and restart.
module tb_apc;
  import parser_pkg::*;
  logic clk = 0, rst_n = 0, restart = 0;
  instr_t instr;
  logic in_valid = 0, hdr_exp = 0, pkt_exp = 0, pkt_armed = 0;
  logic [15:0] pkt_min = 0;
  logic nh_ready = 0, bc_hit = 0, cond_taken = 0;
  logic [7:0] nh_addr = 0, bc_target = 0;
  logic [7:0] next_pc, pc;
  logic exec, pl_valid, pkt_done, stalled_nh, in_payload;
  logic [3:0] consume;
  int checks = 0, failures = 0;

  apc #(.STACK_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  function automatic instr_t mk(seg_sz_e s, br_type_e b, logic [7:0] a = 0, bit nh = 0);
    instr_t i = '0;
    i.seg = s; i.br = b; i.br_addr = a; i.nh_en = nh;
    return i;
  endfunction

  task automatic expect_step(string what, logic [7:0] npc, bit ex, logic [3:0] c, bit done);
    #1; checks++;
    if (next_pc !== npc || exec !== ex || consume !== c || pkt_done !== done) begin
      failures++;
      $display("%s: next_pc %0d/%0d exec %b/%b consume %0d/%0d done %b/%b", what,
               next_pc, npc, exec, ex, consume, c, pkt_done, done);
    end
    @(posedge clk); #1;
    hdr_exp = 0; pkt_exp = 0; cond_taken = 0; bc_hit = 0;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    instr = mk(SEG_64, BR_SEQ);
    repeat (2) @(posedge clk); rst_n = 1; #1;
    checks++; if (pc !== 0) failures++;
    in_valid = 1;
    expect_step("seq", 8'd1, 1, 8, 0);
    in_valid = 0; instr = mk(SEG_32, BR_SEQ);
    expect_step("input stall", 8'd1, 0, 0, 0);
    in_valid = 1; instr = mk(SEG_32, BR_COND, 8'd20); cond_taken = 1;
    expect_step("cond taken", 8'd20, 1, 4, 0);
    instr = mk(SEG_16, BR_COND, 8'd40);
    expect_step("cond not taken", 8'd21, 1, 2, 0);
    instr = mk(SEG_16, BR_CATALYST); bc_hit = 1; bc_target = 8'd50;
    expect_step("catalyst hit", 8'd50, 1, 2, 0);
    instr = mk(SEG_16, BR_CATALYST);
    expect_step("catalyst miss", 8'd51, 1, 2, 0);
    // next-header lookup started, then ready two cycles later
    instr = mk(SEG_64, BR_SEQ, 0, 1);
    expect_step("nh start", 8'd52, 1, 8, 0);
    instr = mk(SEG_32, BR_SEQ); nh_addr = 8'd90; nh_ready = 1; hdr_exp = 1;
    expect_step("hdr expiry, nh ready", 8'd90, 1, 4, 0);
    nh_ready = 0;
    // header expires in the same cycle the lookup starts: stall
    instr = mk(SEG_64, BR_SEQ, 0, 1); hdr_exp = 1;
    expect_step("hdr expiry, nh pending", 8'd90, 1, 8, 0);
    checks++; if (!stalled_nh) begin failures++; $display("no stall"); end
    expect_step("waiting", 8'd90, 0, 0, 0);
    nh_addr = 8'd120; nh_ready = 1;
    expect_step("nh arrives", 8'd120, 0, 0, 0);
    checks++; if (stalled_nh || pc !== 8'd120) begin failures++; $display("no resume"); end
    nh_ready = 0;
    // lookup started at 120; the next-header call at 121 pushes 122
    instr = mk(SEG_16, BR_SEQ, 0, 1);
    expect_step("nh start 2", 8'd121, 1, 2, 0);
    instr = mk(SEG_16, BR_NH_CALL); nh_ready = 1; nh_addr = 8'd150;
    expect_step("nh call", 8'd150, 1, 2, 0);
    nh_ready = 0;
    // header expires, no lookup pending, packet counter armed: payload
    instr = mk(SEG_32, BR_SEQ); hdr_exp = 1; pkt_armed = 1; pkt_min = 16'd30;
    expect_step("to payload", 8'd150, 1, 4, 0);
    checks++; if (!in_payload) begin failures++; $display("not in payload"); end
    pkt_min = 16'd26;
    expect_step("payload 8", 8'd150, 0, 8, 0);
    pkt_min = 16'd5; pkt_exp = 1;
    #1; checks++; if (!pl_valid) failures++;
    expect_step("payload tail pops trailer", 8'd122, 0, 5, 0);
    pkt_armed = 0;
    // trailer instruction ends with end-of-trailer, stack empty: packet done
    instr = mk(SEG_32, BR_EOT);
    expect_step("end of trailer", 8'd0, 1, 4, 1);
    // priority: packet expiry wins over header expiry and branch
    instr = mk(SEG_16, BR_COND, 8'd77); cond_taken = 1; hdr_exp = 1; pkt_exp = 1;
    expect_step("priority", 8'd0, 1, 2, 1);
    // restart wins over everything
    instr = mk(SEG_16, BR_COND, 8'd77); cond_taken = 1; restart = 1;
    expect_step("restart", 8'd0, 1, 2, 0);
    restart = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
