// branch_catalyst: resolves multi-way branches on flag bits in one cycle.
//
// Headers such as GRE carry flag bits that announce optional fields; three
// flags give eight layouts, each parsed by its own code. The catalyst's
// built-in extraction engine takes the flag bits from the current segment and
// compares them with all BC_ENTRIES valid values of the selected table set at
// once; the matching entry's address is the branch target in the same cycle.
// With no match, 'hit' is low and the APC falls through to the next
// instruction. The table is written through a configuration port.
// Eight simultaneous comparisons follow the architecture (GRE example); the
// table organisation in sets and the no-match fall-through are this design's
// choices. Combinational output, registered table.
module branch_catalyst
  import parser_pkg::*;
#(
  parameter int BC_ENTRIES = 8,
  parameter int BC_SETS    = 4
) (
  input  logic                          clk,
  input  logic [SEG_W-1:0]              seg,
  input  ext_spec_t                     spec,
  input  logic [$clog2(BC_SETS)-1:0]    set,
  // table writes
  input  logic                          we,
  input  logic [$clog2(BC_SETS)-1:0]    wr_set,
  input  logic [$clog2(BC_ENTRIES)-1:0] wr_entry,
  input  logic                          wr_valid,
  input  logic [FIELD_W-1:0]            wr_value,
  input  logic [PC_W-1:0]               wr_addr,
  // result
  output logic                          hit,
  output logic [PC_W-1:0]               target
);
  logic [BC_ENTRIES-1:0] vld [BC_SETS];
  logic [FIELD_W-1:0]    val [BC_SETS][BC_ENTRIES];
  logic [PC_W-1:0]       adr [BC_SETS][BC_ENTRIES];
  logic [FIELD_W-1:0]    flags;

  extraction_engine u_ee (.seg(seg), .spec(spec), .field(flags));

  always_ff @(posedge clk) begin
    if (we) begin
      vld[wr_set][wr_entry] <= wr_valid;
      val[wr_set][wr_entry] <= wr_value;
      adr[wr_set][wr_entry] <= wr_addr;
    end
  end

  always_comb begin
    hit    = 1'b0;
    target = '0;
    for (int i = BC_ENTRIES - 1; i >= 0; i--) begin
      if (vld[set][i] && val[set][i] == flags) begin
        hit    = 1'b1;
        target = adr[set][i];
      end
    end
  end
endmodule
