// parser_top: programmable low-latency packet parser.
//
// A packet header is parsed one segment at a time by a small program. In each
// cycle the instruction at 'pc' takes 2, 4 or 8 bytes from the 64-bit input
// window, writes them into containers of the Packet Header Vector, and may
// extract fields that load the header-size counter and a payload/packet-size
// counter, start the Next Header Resolve Unit, or feed the Branch Catalyst or
// the Branch Condition Evaluator. The Advanced Program Control watches the
// counters and the lookup status and picks the next instruction, so header
// and packet boundaries are found in hardware and variable-length headers
// (IPv4 options, IPv6 extensions, TCP options) cost no extra cycles.
//
// Input: 'in_data' shows the next 8 bytes of the byte stream (first byte in
// bits 63:56) while 'in_valid' is high; 'in_consume' says how many of them
// were taken this cycle, and the source advances by that much. At the end of
// a stream the window may be padded; the program never takes more than the
// packet holds. Payload bytes are taken in PAYLOAD state and shown on
// 'pl_valid'/'pl_bytes'/'pl_data' for a payload buffer ('pl_data' is the input
// window itself; the first 'pl_bytes' bytes are valid). After each packet
// 'phv_valid' pulses with the filled containers.
// Configuration: while 'restart' is high the parser holds at the initial
// subroutine; 'cfg' writes the instruction memory, the next-header comparand
// and address stores and the Branch Catalyst table (see parser_pkg).
//
// The 64-bit segment, eight packet counters, eight next-header comparators
// and the unit structure follow the architecture; the stream interface, the
// configuration bus and the memory sizes are this design's choices.
// Assertions check the stream handshake. The header counter value, the
// next-header in-progress/matched flags and the header counter's armed flag
// are internal status that no port needs; they are left unconnected on
// purpose.
module parser_top
  import parser_pkg::*;
#(
  parameter int N_PKT_CNT   = 8,
  parameter int NH_CMP      = 8,
  parameter int STACK_DEPTH = 4,
  parameter int BC_ENTRIES  = 8,
  parameter int BC_SETS     = 4,
  parameter int N_C8        = 16,
  parameter int N_C16       = 16,
  parameter int N_C32       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  cfg_wr_t          cfg,
  // header/packet byte stream
  input  logic             in_valid,
  input  logic [SEG_W-1:0] in_data,
  output logic [3:0]       in_consume,
  // forwarded payload
  output logic             pl_valid,
  output logic [3:0]       pl_bytes,
  output logic [SEG_W-1:0] pl_data,
  // parsed header vector
  output logic             pkt_done,
  output logic             phv_valid,
  output logic [7:0]       c8_out  [N_C8],
  output logic [15:0]      c16_out [N_C16],
  output logic [31:0]      c32_out [N_C32],
  output logic [N_C8-1:0]  v8_out,
  output logic [N_C16-1:0] v16_out,
  output logic [N_C32-1:0] v32_out,
  // status
  output logic             stalled_nh,
  output logic [PC_W-1:0]  pc
);
  localparam int NH_DEPTH = 1 << NH_AW;

  instr_t            instr;
  logic [PC_W-1:0]   next_pc;
  logic              exec, in_payload;
  logic [3:0]        consume;
  logic [FIELD_W-1:0] hdr_field, pkt_field;
  logic              hdr_exp, hdr_armed, pkt_exp, pkt_armed;
  logic [CNT_W-1:0]  pkt_min, hdr_cnt;
  logic              nh_in_progress, nh_ready, nh_matched;
  logic [PC_W-1:0]   nh_addr;
  logic              bc_hit, cond_taken;
  logic [PC_W-1:0]   bc_target;

  instr_mem #(.DEPTH(1 << PC_W)) u_imem (
    .clk   (clk),
    .we    (cfg.we && cfg.tgt == CFG_IMEM),
    .waddr (cfg.addr[PC_W-1:0]),
    .wdata (instr_t'(cfg.data)),
    .raddr (next_pc),
    .instr (instr)
  );

  apc #(.STACK_DEPTH(STACK_DEPTH)) u_apc (
    .clk        (clk),
    .rst_n      (rst_n),
    .restart    (restart),
    .instr      (instr),
    .in_valid   (in_valid),
    .hdr_exp    (hdr_exp),
    .pkt_exp    (pkt_exp),
    .pkt_armed  (pkt_armed),
    .pkt_min    (pkt_min),
    .nh_ready   (nh_ready),
    .nh_addr    (nh_addr),
    .bc_hit     (bc_hit),
    .bc_target  (bc_target),
    .cond_taken (cond_taken),
    .next_pc    (next_pc),
    .pc         (pc),
    .exec       (exec),
    .consume    (consume),
    .pl_valid   (pl_valid),
    .pkt_done   (pkt_done),
    .stalled_nh (stalled_nh),
    .in_payload (in_payload)
  );

  extraction_engine u_ee_hdr (.seg(in_data), .spec(instr.hdr_ext), .field(hdr_field));
  extraction_engine u_ee_pkt (.seg(in_data), .spec(instr.pkt_ext), .field(pkt_field));

  boundary_counters #(.N_PKT_CNT(N_PKT_CNT)) u_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (pkt_done || restart),
    .consume   (consume),
    .hdr_ld    (exec && instr.hdr_ld),
    .hdr_field (hdr_field),
    .hdr_imm   (instr.hdr_imm),
    .pkt_ld    (exec && instr.pkt_ld),
    .pkt_sel   (instr.pkt_sel[$clog2(N_PKT_CNT)-1:0]),
    .pkt_field (pkt_field),
    .pkt_imm   (instr.pkt_imm),
    .hdr_exp   (hdr_exp),
    .hdr_armed (hdr_armed),
    .pkt_exp   (pkt_exp),
    .pkt_armed (pkt_armed),
    .pkt_min   (pkt_min),
    .hdr_cnt   (hdr_cnt)
  );

  nh_resolve_unit #(.NH_CMP(NH_CMP), .NH_DEPTH(NH_DEPTH)) u_nhru (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (exec && instr.nh_en && !restart),
    .seg           (in_data),
    .spec          (instr.nh_ext),
    .start_addr    (instr.nh_start),
    .iters         (instr.nh_iters),
    .default_addr  (instr.nh_default),
    .cmp_we        (cfg.we && cfg.tgt == CFG_NH_CMP),
    .adr_we        (cfg.we && cfg.tgt == CFG_NH_ADDR),
    .wr_word       (cfg.addr[$clog2(NH_CMP) +: NH_AW]),
    .wr_lane       (cfg.addr[$clog2(NH_CMP)-1:0]),
    .wr_cmp_valid  (cfg.data[FIELD_W]),
    .wr_cmp        (cfg.data[FIELD_W-1:0]),
    .wr_adr        (cfg.data[PC_W-1:0]),
    .in_progress   (nh_in_progress),
    .ready         (nh_ready),
    .matched       (nh_matched),
    .resolved_addr (nh_addr)
  );

  branch_catalyst #(.BC_ENTRIES(BC_ENTRIES), .BC_SETS(BC_SETS)) u_bc (
    .clk      (clk),
    .seg      (in_data),
    .spec     (instr.br_ext),
    .set      (instr.bc_set[$clog2(BC_SETS)-1:0]),
    .we       (cfg.we && cfg.tgt == CFG_BC),
    .wr_set   (cfg.addr[$clog2(BC_ENTRIES) +: $clog2(BC_SETS)]),
    .wr_entry (cfg.addr[$clog2(BC_ENTRIES)-1:0]),
    .wr_valid (cfg.data[PC_W+FIELD_W]),
    .wr_value (cfg.data[PC_W +: FIELD_W]),
    .wr_addr  (cfg.data[PC_W-1:0]),
    .hit      (bc_hit),
    .target   (bc_target)
  );

  branch_cond_eval u_bce (
    .seg     (in_data),
    .spec    (instr.br_ext),
    .cond    (instr.cond),
    .ref_val (instr.cond_ref),
    .taken   (cond_taken)
  );

  phv_filler #(.N_C8(N_C8), .N_C16(N_C16), .N_C32(N_C32)) u_phv (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (exec && !restart),
    .seg       (in_data),
    .nbytes    (consume),
    .mode      (instr.phv_mode),
    .idx       (instr.phv_idx),
    .done      (pkt_done),
    .phv_valid (phv_valid),
    .c8_out    (c8_out),
    .c16_out   (c16_out),
    .c32_out   (c32_out),
    .v8_out    (v8_out),
    .v16_out   (v16_out),
    .v32_out   (v32_out)
  );

  assign in_consume = consume;
  assign pl_bytes   = pl_valid ? consume : '0;
  assign pl_data    = in_data;

  // stream handshake: nothing is taken from an empty window, never more than
  // the window holds, and payload only leaves in payload forwarding
  a_no_take_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                    !in_valid |-> in_consume == '0);
  a_take_le_window: assert property (@(posedge clk) disable iff (!rst_n)
                                     in_consume <= 4'(SEG_BYTES));
  a_payload_state: assert property (@(posedge clk) disable iff (!rst_n)
                                    pl_valid |-> in_payload);
endmodule
