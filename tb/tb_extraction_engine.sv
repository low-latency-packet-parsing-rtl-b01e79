// tb_extraction_engine: random segments and field specifications; the
// expected field is rebuilt bit by bit (first bit of the field = window bit
// 63-off) and compared with the engine's output.
module tb_extraction_engine;
  import parser_pkg::*;
  logic [SEG_W-1:0]   seg;
  ext_spec_t          spec;
  logic [FIELD_W-1:0] field;
  int checks = 0, failures = 0;

  extraction_engine dut (.seg(seg), .spec(spec), .field(field));

  function automatic logic [FIELD_W-1:0] model(logic [SEG_W-1:0] s, ext_spec_t p);
    logic [31:0] v = 0;
    if (p.len == 0 || int'(p.off) + int'(p.len) > SEG_W || p.len > 16) return '0;
    for (int b = 0; b < int'(p.len); b++) v = (v << 1) | 32'(s[SEG_W-1-int'(p.off)-b]);
    return FIELD_W'(v << p.shl);
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // IPv4 IHL (bits 4..7 of first byte) scaled to bytes
    seg = 64'h4500_0054_1c46_4000; spec = '{off: 6'd4, len: 5'd4, shl: 3'd2}; #1;
    checks++; if (field !== 16'd20) begin failures++; $display("IHL got %0d", field); end
    // total length
    spec = '{off: 6'd16, len: 5'd16, shl: 3'd0}; #1;
    checks++; if (field !== 16'h0054) begin failures++; $display("TL got %h", field); end
    // length 0 gives 0
    spec = '{off: 6'd0, len: 5'd0, shl: 3'd0}; #1;
    checks++; if (field !== 16'd0) failures++;
    for (int i = 0; i < 2000; i++) begin
      seg  = {$urandom, $urandom};
      spec = '{off: 6'($urandom), len: 5'($urandom_range(0, 16)), shl: 3'($urandom_range(0, 3))};
      #1;
      checks++;
      if (field !== model(seg, spec)) begin
        failures++;
        if (failures < 5) $display("mismatch seg=%h off=%0d len=%0d got %h exp %h",
                                   seg, spec.off, spec.len, field, model(seg, spec));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
