// tb_branch_cond_eval: every condition code on random fields and reference
// values (with forced equal and boundary cases), checked against integer
// comparisons in the testbench.
module tb_branch_cond_eval;
  import parser_pkg::*;
  logic [63:0] seg;
  ext_spec_t spec;
  cond_e cond;
  logic [15:0] ref_val;
  logic taken;
  int checks = 0, failures = 0;

  branch_cond_eval dut (.seg, .spec, .cond, .ref_val, .taken);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int f, r; bit e;
      seg  = {$urandom, $urandom};
      spec = '{off: 6'($urandom_range(0, 48)), len: 5'd16, shl: 3'd0};
      f    = int'(seg[63 - int'(spec.off) -: 16]);
      case ($urandom_range(0, 3))
        0: r = f;
        1: r = (f + 1) % 65536;
        2: r = (f + 65535) % 65536;
        default: r = $urandom_range(0, 65535);
      endcase
      ref_val = 16'(r);
      cond = cond_e'($urandom_range(0, 7));
      case (cond)
        CC_EQ: e = f == r;  CC_NE: e = f != r;
        CC_LT: e = f < r;   CC_GT: e = f > r;
        CC_LE: e = f <= r;  CC_GE: e = f >= r;
        CC_ANY: e = (f & r) != 0;
        default: e = (f & r) == 0;
      endcase
      #1; checks++;
      if (taken !== e) begin
        failures++; if (failures < 6) $display("cond %0d f %0d r %0d got %b", cond, f, r, taken);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
