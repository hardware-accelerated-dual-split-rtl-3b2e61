// tb_return_value_logic: exhaustive test of the return-code logic.
//
// All 2^6 input combinations are applied; the expected code is written out per node type:
// split = number of children hit, carving = 0 when culled, else 3 for a carving leaf or 1,
// leaf = 3.
module tb_return_value_logic;
  import dst_pkg::*;

  node_type_e nt;
  logic near_hit, far_hit, range_ok, leaf_bit;
  logic [1:0] ret, expv;
  int checks = 0, failures = 0;

  return_value_logic dut (.node_type(nt), .near_hit(near_hit), .far_hit(far_hit),
                          .range_ok(range_ok), .leaf_bit(leaf_bit), .ret(ret));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {nt, near_hit, far_hit, range_ok, leaf_bit} = 6'(v);
      #1;
      case (nt)
        NODE_SPLIT:  expv = (near_hit && far_hit) ? 2'd2 : ((near_hit || far_hit) ? 2'd1 : 2'd0);
        NODE_CARVE1,
        NODE_CARVE2: expv = range_ok ? (leaf_bit ? 2'd3 : 2'd1) : 2'd0;
        default:     expv = 2'd3;
      endcase
      checks++;
      if (ret !== expv) begin
        failures++;
        $display("FAIL type=%0d nh=%b fh=%b ok=%b leaf=%b exp=%0d got=%0d", nt, near_hit, far_hit, range_ok, leaf_bit, expv, ret);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
