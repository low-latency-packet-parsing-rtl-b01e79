// apc: Advanced Program Control.
//
// In every cycle the APC decides which instruction runs in the next cycle
// (next_pc, read synchronously by the instruction memory) and whether the
// current instruction runs at all. Boundary checking is done here in
// hardware, so the parse program needs no check-and-branch instructions and
// has no dead cycles. The decision follows a fixed priority:
//   1. restart (or reset)          -> initial subroutine (address INIT_ADDR);
//   2. a payload/packet counter expires -> pop the trailer stack, or restart
//                                     at the initial subroutine when it is empty
//                                     (the packet is done);
//   3. the header counter expires  -> next header's subroutine when a
//                                     next-header lookup is pending; else
//                                     forward the payload when a packet counter
//                                     is armed; else trailers / restart as in 2;
//   4. otherwise the branch type of the instruction: sequential, Branch
//      Catalyst, next header, next-header call (pushes PC+1, the first
//      trailer instruction, on a return stack), payload forwarding, end of
//      trailer (as in 2), conditional branch on the Branch Condition Evaluator.
// When the next header is needed but the Next Header Resolve Unit is not yet
// ready, the APC stalls in WAIT_NH without consuming input. In PAYLOAD it
// forwards up to 8 bytes per cycle, never beyond the nearest packet counter,
// until that counter expires. A missing input window ('in_valid' low) also
// stalls an instruction that consumes bytes.
//
// Interface: 'exec' says the current instruction takes effect this cycle;
// 'consume' is the number of stream bytes taken; 'pkt_done' pulses when a
// packet ends. The priorities and the branch types follow the architecture;
// the sequential branch type, the stall states, the stack depth and the
// handling of an empty stack are this design's choices.
module apc
  import parser_pkg::*;
#(
  parameter int             STACK_DEPTH = 4,
  parameter logic [PC_W-1:0] INIT_ADDR  = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  instr_t          instr,
  input  logic            in_valid,
  // boundary counters
  input  logic            hdr_exp,
  input  logic            pkt_exp,
  input  logic            pkt_armed,
  input  logic [CNT_W-1:0] pkt_min,
  // next header resolve unit
  input  logic            nh_ready,
  input  logic [PC_W-1:0] nh_addr,
  // branch units
  input  logic            bc_hit,
  input  logic [PC_W-1:0] bc_target,
  input  logic            cond_taken,
  // outputs
  output logic [PC_W-1:0] next_pc,
  output logic [PC_W-1:0] pc,
  output logic            exec,
  output logic [3:0]      consume,
  output logic            pl_valid,
  output logic            pkt_done,
  output logic            stalled_nh,
  output logic            in_payload
);
  typedef enum logic [1:0] {ST_RUN, ST_WAIT_NH, ST_PAYLOAD} state_e;

  localparam int SP_W = $clog2(STACK_DEPTH + 1);

  state_e            state, state_n;
  logic              nh_pending, nh_pending_n;
  logic [PC_W-1:0]   stack [STACK_DEPTH];
  logic [SP_W-1:0]   sp, sp_n;
  logic              push, pop;
  logic [PC_W-1:0]   pc_inc;
  logic [3:0]        nbytes;
  logic              nh_pend_now, nh_rdy_now;

  logic [PC_W-1:0]   pc_q;

  assign pc         = pc_q;
  assign stalled_nh = (state == ST_WAIT_NH);
  assign in_payload = (state == ST_PAYLOAD);

  always_comb begin
    nbytes       = seg_bytes(instr.seg);
    pc_inc       = pc_q + 1'b1;
    state_n      = state;
    next_pc      = pc_q;
    nh_pending_n = nh_pending;
    sp_n         = sp;
    push         = 1'b0;
    pop          = 1'b0;
    exec         = 1'b0;
    consume      = '0;
    pl_valid     = 1'b0;
    pkt_done     = 1'b0;
    nh_pend_now  = nh_pending || instr.nh_en;
    nh_rdy_now   = nh_pending && nh_ready && !instr.nh_en;

    unique case (state)
      ST_RUN: begin
        exec    = in_valid || nbytes == '0;
        consume = exec ? nbytes : '0;
        if (exec) begin
          if (instr.nh_en) nh_pending_n = 1'b1;
          if (instr.br == BR_NH_CALL && !pkt_exp) push = 1'b1;
          if (pkt_exp) begin
            pop = 1'b1;                               // trailers or restart
          end else if (hdr_exp || instr.br == BR_NEXT_HDR || instr.br == BR_NH_CALL) begin
            if (nh_pend_now) begin
              if (nh_rdy_now) begin
                next_pc      = nh_addr;
                nh_pending_n = 1'b0;
              end else begin
                state_n = ST_WAIT_NH;
              end
            end else if (pkt_armed || (instr.pkt_ld)) begin
              state_n = ST_PAYLOAD;
            end else begin
              pop = 1'b1;
            end
          end else begin
            unique case (instr.br)
              BR_CATALYST: next_pc = bc_hit ? bc_target : pc_inc;
              BR_PAYLOAD:  if (pkt_armed || instr.pkt_ld) state_n = ST_PAYLOAD;
                           else pop = 1'b1;
              BR_EOT:      pop = 1'b1;
              BR_COND:     next_pc = cond_taken ? instr.br_addr : pc_inc;
              default:     next_pc = pc_inc;
            endcase
          end
        end
      end
      ST_WAIT_NH: begin
        if (nh_ready) begin
          next_pc      = nh_addr;
          nh_pending_n = 1'b0;
          state_n      = ST_RUN;
        end
      end
      ST_PAYLOAD: begin
        if (!pkt_armed) begin
          pop     = 1'b1;
          state_n = ST_RUN;
        end else begin
          consume  = in_valid ? ((pkt_min < CNT_W'(SEG_BYTES)) ? pkt_min[3:0] : 4'(SEG_BYTES)) : '0;
          pl_valid = consume != '0;
          if (pkt_exp) begin
            pop     = 1'b1;
            state_n = ST_RUN;
          end
        end
      end
      default: state_n = ST_RUN;
    endcase

    // return stack: 'pop' means "go to a pending trailer, else restart"
    if (push) sp_n = (sp < SP_W'(STACK_DEPTH)) ? sp + 1'b1 : sp;
    if (pop) begin
      if (sp_n != '0) begin
        next_pc = (push && sp_n == sp + 1'b1) ? pc_inc : stack[int'(sp_n) - 1];
        sp_n    = sp_n - 1'b1;
      end else begin
        next_pc      = INIT_ADDR;
        pkt_done     = 1'b1;
        nh_pending_n = 1'b0;
      end
    end

    if (restart) begin
      next_pc      = INIT_ADDR;
      state_n      = ST_RUN;
      sp_n         = '0;
      nh_pending_n = 1'b0;
      pkt_done     = 1'b0;
      push         = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q       <= INIT_ADDR;
      state      <= ST_RUN;
      nh_pending <= 1'b0;
      sp         <= '0;
      for (int i = 0; i < STACK_DEPTH; i++) stack[i] <= '0;
    end else begin
      pc_q       <= next_pc;
      state      <= state_n;
      nh_pending <= nh_pending_n;
      sp         <= sp_n;
      if (push && sp < SP_W'(STACK_DEPTH)) stack[int'(sp)] <= pc_inc;
    end
  end

  // a next-header call must find room on the return stack
  a_stack_room: assert property (@(posedge clk) disable iff (!rst_n)
                                 push |-> sp < SP_W'(STACK_DEPTH));
endmodule
