// tgc_endcap_top: on-detector trigger/readout chain of one end-cap muon trigger unit.
//
// Front-end hits go through patch-panel chips into slave-board chips, whose low-pT results
// meet in a high-pT chip:
//   * three doublet slave boards, each fed by nine patch-panel chips (144 channels, of which
//     the 142 slave-board inputs are used), run the doublet coincidence matrix;
//   * one triplet slave board, fed by seven patch-panel chips (112 channels, 108 used), runs
//     the 2-out-of-3 (wires) or OR (strips) coincidence;
//   * the high-pT chip receives the six doublet tracks (two per doublet board, block k =
//     board k/2, half k%2) and the triplet candidates, and sends two tracks to the sector
//     logic. The high-pT chip has twelve triplet inputs (four triplet wire boards); the one
//     triplet board here fills the first four, and the rest are tied off.
// strip_sel sets all chips to wires (0) or strips (1). Every slave board also reads out its
// crossings on level-1 accept through its own local slave link. The patch-panel registers are
// reached through one bus: reg_chip selects the chip (doublet board s uses chips 9s..9s+8,
// the triplet board chips 27..33), reg_addr the register.
//
// Timing: a track at the front-end pins reaches hpt_out 1 (patch panel) + 2 (slave board) +
// 2 (high-pT chip) = 5 clocks later with zero coarse delays: hpt_out changes at the fifth
// clock edge counted from the one that samples the front-end pins. The level-1 accept for a
// crossing must be sampled latency+4 edges after the edge that sampled its front-end hits.
//
// The chain patch panel -> slave board -> high-pT chip and the readout branch follow the
// design description. The number of boards per high-pT chip, the mapping of triplet
// channel c to high-pT column c+TRIP_COL_OFS and the register addressing are own choices
// standing for board wiring the description does not give.
module tgc_endcap_top
  import tgc_pkg::*;
#(
  parameter int unsigned N_DSLB       = 3,
  parameter int unsigned NPP_D        = 9,
  parameter int unsigned NPP_T        = 7,
  parameter int unsigned TRIP_COL_OFS = HPT_MAXD_W,
  parameter int unsigned L1_DEPTH     = 128
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   strip_sel,
  // front-end (ASD) hits and test pulses back to the front end
  input  logic [N_DSLB-1:0][NPP_D*PP_NCH-1:0]    asd_doublet,
  input  logic [NPP_T*PP_NCH-1:0]                asd_triplet,
  input  logic                                   tp_req,
  output logic [N_DSLB-1:0][NPP_D*PP_NCH-1:0]    tp_doublet,
  output logic [NPP_T*PP_NCH-1:0]                tp_triplet,
  // patch-panel register bus
  input  logic                                   reg_we,
  input  logic [5:0]                             reg_chip,
  input  logic [PP_AW-1:0]                       reg_addr,
  input  logic [PP_REG_W-1:0]                    reg_wdata,
  output logic [PP_REG_W-1:0]                    reg_rdata,
  output logic                                   seu_seen,
  input  logic                                   inj_en,
  input  logic [1:0]                             inj_copy,
  input  logic [PP_REG_W-1:0]                    inj_mask,
  // timing and trigger control
  input  logic                                   bcr,
  input  logic                                   ecr,
  input  logic                                   l1a,
  input  logic [$clog2(L1_DEPTH)-1:0]            l1_latency,
  input  logic [2:0]                             hpt_dly_doublet,
  input  logic [2:0]                             hpt_dly_triplet,
  // to the sector logic
  output hpt_cand_t                              hpt_out [2],
  // low-pT results of the triplet board (also sent on to the high-pT chip)
  output slb_trig_t                              trig_triplet,
  // readout links to the star switch, index N_DSLB = triplet board
  output logic [N_DSLB:0]                        link_clk,
  output logic [N_DSLB:0]                        link_sync,
  output logic [N_DSLB:0][1:0]                   link_data,
  output logic [N_DSLB:0]                        dr_overflow
);
  localparam int unsigned NPP = N_DSLB*NPP_D + NPP_T;

  logic [PP_NCH-1:0]   pp_hit_in  [NPP];
  logic [PP_NCH-1:0]   pp_hit_out [NPP];
  logic [PP_NCH-1:0]   pp_tp      [NPP];
  logic [PP_REG_W-1:0] pp_rdata   [NPP];
  logic [NPP-1:0]      pp_seu;
  slb_trig_t           trig_d [N_DSLB];
  hpt_din_t            hdin [HPT_NBLK];
  hpt_tin_t            htin [HPT_NTRIP];

  // ---------------- patch-panel chips
  for (genvar s = 0; s < N_DSLB; s++) begin : g_ppd
    for (genvar c = 0; c < NPP_D; c++) begin : g_chip
      assign pp_hit_in[s*NPP_D+c]           = asd_doublet[s][c*PP_NCH +: PP_NCH];
      assign tp_doublet[s][c*PP_NCH +: PP_NCH] = pp_tp[s*NPP_D+c];
    end
  end
  for (genvar c = 0; c < NPP_T; c++) begin : g_ppt
    assign pp_hit_in[N_DSLB*NPP_D+c]      = asd_triplet[c*PP_NCH +: PP_NCH];
    assign tp_triplet[c*PP_NCH +: PP_NCH] = pp_tp[N_DSLB*NPP_D+c];
  end

  for (genvar p = 0; p < NPP; p++) begin : g_pp
    ppic u_ppic (
      .clk(clk), .rst_n(rst_n),
      .hit_in(pp_hit_in[p]), .hit_out(pp_hit_out[p]),
      .tp_req(tp_req), .tp_out(pp_tp[p]),
      .reg_we(reg_we && reg_chip == 6'(p)), .reg_addr(reg_addr), .reg_wdata(reg_wdata),
      .reg_rdata(pp_rdata[p]), .seu_seen(pp_seu[p]),
      .inj_en(inj_en && reg_chip == 6'(p)), .inj_copy(inj_copy), .inj_addr(reg_addr),
      .inj_mask(inj_mask)
    );
  end

  always_comb begin
    reg_rdata = '0;
    for (int p = 0; p < NPP; p++)
      if (reg_chip == 6'(p)) reg_rdata = pp_rdata[p];
  end
  assign seu_seen = |pp_seu;

  // ---------------- slave-board chips
  for (genvar s = 0; s <= N_DSLB; s++) begin : g_slb
    logic [NPP_D*PP_NCH-1:0] bank;
    slb_mode_e               mode;
    slb_trig_t               trig;
    if (s < N_DSLB) begin : g_dbl
      for (genvar c = 0; c < NPP_D; c++) begin : g_b
        assign bank[c*PP_NCH +: PP_NCH] = pp_hit_out[s*NPP_D+c];
      end
      assign mode      = strip_sel ? MODE_DOUBLET_STRIP : MODE_DOUBLET_WIRE;
      assign trig_d[s] = trig;
    end else begin : g_trp
      assign bank[NPP_D*PP_NCH-1:NPP_T*PP_NCH] = '0;
      for (genvar c = 0; c < NPP_T; c++) begin : g_b
        assign bank[c*PP_NCH +: PP_NCH] = pp_hit_out[N_DSLB*NPP_D+c];
      end
      assign mode         = strip_sel ? MODE_TRIPLET_STRIP : MODE_TRIPLET_WIRE;
      assign trig_triplet = trig;
    end
    slbic #(.L1_DEPTH(L1_DEPTH)) u_slbic (
      .clk(clk), .rst_n(rst_n), .mode(mode), .hit_in(bank[SLB_NIN-1:0]),
      .bcr(bcr), .ecr(ecr), .l1a(l1a), .latency(l1_latency),
      .trig_out(trig),
      .link_clk(link_clk[s]), .link_sync(link_sync[s]), .link_data(link_data[s]),
      .dr_overflow(dr_overflow[s])
    );
  end

  // ---------------- high-pT chip
  always_comb begin
    for (int k = 0; k < HPT_NBLK; k++) begin
      if (k/2 < N_DSLB) begin
        hdin[k].valid = trig_d[k/2][k%2].valid;
        hdin[k].dlow  = trig_d[k/2][k%2].data[8:5];
        hdin[k].pos   = trig_d[k/2][k%2].data[4:0];
      end else begin
        hdin[k] = '0;
      end
    end
    // one triplet board fills the first four candidate inputs; the rest would come from
    // further triplet wire boards, which this model does not contain
    for (int t = 0; t < HPT_NTRIP; t++) begin
      if (t < SLB_NSLOT) begin
        htin[t].valid = trig_triplet[t].valid;
        htin[t].col   = HPT_COL_W'(int'(trig_triplet[t].data) + TRIP_COL_OFS);
      end else begin
        htin[t] = '0;
      end
    end
  end

  hptic u_hptic (
    .clk(clk), .rst_n(rst_n), .strip_mode(strip_sel),
    .dly_doublet(hpt_dly_doublet), .dly_triplet(hpt_dly_triplet),
    .din(hdin), .tin(htin), .out(hpt_out)
  );
endmodule
