// tb_obelix_top_full: the end-to-end test of tb_obelix_top run on the chip
// at its default size: 112 trigger groups, 448 double columns, every
// parameter of the top at its default value. See tb_obelix_top for what is
// driven and checked.
`include "tb_macros.svh"
`define OBELIX_TOP_INST obelix_top dut (.*);
module tb_obelix_top_full;
  import obelix_pkg::*;
  import tb_ref_pkg::*;
  localparam int NT = 112;
`include "tb_obelix_top_body.svh"
endmodule
`undef OBELIX_TOP_INST
