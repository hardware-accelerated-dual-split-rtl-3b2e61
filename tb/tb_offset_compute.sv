// tb_offset_compute: self-checking test of the child offset logic.
//
// Random 26-bit offsets (including the all-ones offset, where the right child address carries
// into bit 26), every left child size, both ray signs, both hit outcomes and split / non-split
// nodes. Expected: left = offset, right = offset + size; near/far by ray sign; output =
// near if hit else far for a split node, the header offset otherwise; stack = far child.
module tb_offset_compute;
  import dst_pkg::*;

  logic [OFS_W-1:0] offset;
  logic [1:0] size;
  logic sign, near_hit, is_split;
  logic [31:0] o, os, e_o, e_os, left, right;
  int checks = 0, failures = 0;

  offset_compute dut (.offset(offset), .left_size(size), .ray_sign(sign), .near_hit(near_hit),
                      .is_split(is_split), .offset_out(o), .offset_stack(os));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      offset = (n < 16) ? {OFS_W{1'b1}} : OFS_W'($urandom);
      {size, sign, near_hit, is_split} = 5'(n);
      #1;
      left  = {6'd0, offset};
      right = {6'd0, offset} + {30'd0, size};
      e_os  = sign ? left : right;
      if (!is_split)     e_o = left;
      else if (near_hit) e_o = sign ? right : left;
      else               e_o = e_os;
      checks += 2;
      if (o !== e_o)   begin failures++; if (failures < 10) $display("FAIL offset n=%0d exp=%h got=%h", n, e_o, o); end
      if (os !== e_os) begin failures++; if (failures < 10) $display("FAIL stack n=%0d exp=%h got=%h", n, e_os, os); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
