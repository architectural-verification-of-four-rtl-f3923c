// dest_overwrite: intra-block destination fix-up before the issue pointer buffer write.
//
// When several slots of a block name the same logical destination, the pointer written
// for each of them is replaced by the new pointer of the latest such slot, so the issue
// pointer buffer ends up holding the youngest mapping whichever write wins. Slot i is
// compared with every later slot j > i (slot 0 with 1, 2, 3; slot 1 with 2, 3; slot 2 with
// 3) through a chain of multiplexers, as in the description; slot 3 passes through.
// Destination 0 (no destination) never matches. Purely combinational.
module dest_overwrite
  import mips_pkg::*;
(
  input  lreg_t [3:0] dest_i,
  input  pptr_t [3:0] new_dest_i,
  output pptr_t [3:0] ow_dest_o
);
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      ow_dest_o[i] = new_dest_i[i];
      for (int j = i + 1; j < 4; j++)
        if (dest_i[i] != 5'd0 && dest_i[i] == dest_i[j]) ow_dest_o[i] = new_dest_i[j];
    end
  end
endmodule
