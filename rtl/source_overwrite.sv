// source_overwrite: intra-block source renaming fix-up.
//
// The issue pointer buffer is read for a block before that block's own destinations
// are written into it. For every slot j, the RS and RT logical numbers are compared
// with the logical destinations of the earlier slots i < j of the same block; the
// pointer read from the buffer (rs_ipb/rt_ipb) is replaced by the new destination
// pointer of the nearest such earlier slot. The comparator/multiplexer chain (slot 1
// against slot 0, slot 2 against 0 then 1, slot 3 against 0, 1 then 2) is the
// structure of the description. $zero (register 0) and slots without a destination
// (rd = 0) never match. Purely combinational.
module source_overwrite
  import mips_pkg::*;
(
  input  lreg_t [3:0] rs_i,
  input  lreg_t [3:0] rt_i,
  input  lreg_t [3:0] rd_i,
  input  pptr_t [3:0] new_dest_i,
  input  pptr_t [3:0] rs_ipb_i,
  input  pptr_t [3:0] rt_ipb_i,
  output pptr_t [3:0] owrs_o,
  output pptr_t [3:0] owrt_o
);
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      owrs_o[j] = rs_ipb_i[j];
      owrt_o[j] = rt_ipb_i[j];
      for (int i = 0; i < j; i++) begin
        if (rd_i[i] != 5'd0 && rd_i[i] == rs_i[j]) owrs_o[j] = new_dest_i[i];
        if (rd_i[i] != 5'd0 && rd_i[i] == rt_i[j]) owrt_o[j] = new_dest_i[i];
      end
    end
  end
endmodule
