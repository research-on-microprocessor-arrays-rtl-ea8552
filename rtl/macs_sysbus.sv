// System bus of the array: one shared word, read by every PE and by the
// working memory, driven in any cycle by at most one of NDRV drivers (the PEs
// and the working memory).
//
// The bus carries the driver's word and its lookup-request marker. The
// drivers' contributions are ORed (an idle driver contributes zeros), so the
// result is the driving unit's word; `conflict` flags a cycle with more than
// one driver, which the microprograms must avoid, and an assertion reports it
// in simulation while `rst_n` is high (before reset the drivers' state is
// undefined). An idle bus reads 0. Purely combinational.
// A single bus shared by PEs and working memory follows the report; the
// merge, the lookup marker and the idle value are this design's.
module macs_sysbus
  import macs_pkg::*;
#(
  parameter int unsigned NDRV = 9
) (
  input  logic  clk,
  input  logic  rst_n,
  input  bus_t  drv [NDRV],
  output word_t data,
  output logic  lut_req,
  output logic  lut_tbl,
  output logic  conflict
);
  int unsigned n_drv;

  always_comb begin
    data    = '0;
    lut_req = 1'b0;
    lut_tbl = 1'b0;
    n_drv   = 0;
    for (int i = 0; i < int'(NDRV); i++) begin
      data    = data | drv[i].data;
      lut_req = lut_req | drv[i].lut_req;
      lut_tbl = lut_tbl | drv[i].lut_tbl;
      n_drv   = n_drv + (drv[i].drv ? 1 : 0);
    end
    conflict = (n_drv > 1);
  end

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("system bus driven by %0d units in one cycle", n_drv);

endmodule
