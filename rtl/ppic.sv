// ppic: digital part of the patch-panel chip.
//
// Sixteen hit channels arrive (after level conversion and sub-ns delay adjustment, which are
// analog and outside this model) and leave as one-crossing pulses assigned to their bunch
// crossing. The chip also generates test pulses for the front-end boards. Its settings sit
// in four SEU-protected registers reached through a simple write/read bus:
//   0: channel enable mask   1: test pulse channel mask
//   2: test pulse delay [7:0]   3: bit 0 test pulse enable
// Timing: hit_out follows hit_in by one clock; register writes take effect on the next
// clock.
//
// Bunch crossing identification, test pulses and SEU-tolerant registers follow the design
// description; the register map and bus are own choices.
module ppic
  import tgc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PP_NCH-1:0]   hit_in,
  output logic [PP_NCH-1:0]   hit_out,
  input  logic                tp_req,
  output logic [PP_NCH-1:0]   tp_out,
  input  logic                reg_we,
  input  logic [PP_AW-1:0]    reg_addr,
  input  logic [PP_REG_W-1:0] reg_wdata,
  output logic [PP_REG_W-1:0] reg_rdata,
  output logic                seu_seen,
  input  logic                inj_en,
  input  logic [1:0]          inj_copy,
  input  logic [PP_AW-1:0]    inj_addr,
  input  logic [PP_REG_W-1:0] inj_mask
);
  logic [PP_REG_W-1:0] regs [PP_NREG];

  pp_tmr_regs #(.NREG(PP_NREG), .W(PP_REG_W)) u_regs (
    .clk(clk), .rst_n(rst_n), .we(reg_we), .addr(reg_addr), .wdata(reg_wdata),
    .rdata(reg_rdata), .q(regs), .seu_seen(seu_seen),
    .inj_en(inj_en), .inj_copy(inj_copy), .inj_addr(inj_addr), .inj_mask(inj_mask)
  );

  pp_bcid #(.NCH(PP_NCH)) u_bcid (
    .clk(clk), .rst_n(rst_n), .hit_in(hit_in), .mask(regs[PP_REG_MASK]), .hit_out(hit_out)
  );

  pp_testpulse #(.NCH(PP_NCH), .DW(8)) u_tp (
    .clk(clk), .rst_n(rst_n), .enable(regs[PP_REG_CTRL][0]), .tp_req(tp_req),
    .delay(regs[PP_REG_TPDLY][7:0]), .tp_mask(regs[PP_REG_TPMASK]), .tp_out(tp_out)
  );
endmodule
