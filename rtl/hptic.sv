// hptic: high-pT chip. Finds high-pT tracks by matching doublet against triplet.
//
// Inputs per crossing: six doublet candidates from up to three slave boards (two per board:
// position in a 32-position block and low-pT displacement) and up to twelve triplet
// candidates as column numbers of the matrix (four triplet wire boards with three tracks
// each; a triplet strip board uses four of them). Both buses pass a coarse delay (0..7 crossings,
// separate setting per bus) and an input register. The triplet candidates are decoded into a
// 222-bit column pattern; block k of the matrix sees doublet candidate k on its row and
// columns 32k .. 32k+61, so column 32k+15+pos+d is displacement d from doublet position pos.
// Each block yields at most one high-pT candidate with its own displacement (window +-15 for
// wires, +-7 for strips, chosen by strip_mode). Two 2-out-of-6 selectors pick the two best
// high candidates and the two best low candidates (blocks without a high match, with the
// slave board's displacement); the H/L select forms HH, HL or LL and the result is
// registered in the output buffer.
//
// Timing: with both coarse delays at 0 the output follows the inputs by exactly two clocks
// (input buffer and output buffer), matching the two clocks measured for the chip.
//
// The six blocks, the 2-out-of-6 select, the H/L select, coarse delays and buffers are the
// document's (block diagram and text); the window sizes, the column geometry and the
// candidate format are own choices.
module hptic
  import tgc_pkg::*;
#(
  parameter int unsigned CD_MAX = 7
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          strip_mode,   // 0: wires, 1: strips
  input  logic [$clog2(CD_MAX+1)-1:0]   dly_doublet,
  input  logic [$clog2(CD_MAX+1)-1:0]   dly_triplet,
  input  hpt_din_t                      din [HPT_NBLK],
  input  hpt_tin_t                      tin [HPT_NTRIP],
  output hpt_cand_t                     out [2]
);
  localparam int unsigned DW   = $bits(hpt_din_t);
  localparam int unsigned TW   = $bits(hpt_tin_t);
  localparam int unsigned BCOL = HPT_POS_BLK + 2*HPT_MAXD_W;

  logic [HPT_NBLK*DW-1:0]  d_flat, d_dly;
  logic [HPT_NTRIP*TW-1:0] t_flat, t_dly;
  hpt_din_t                d_q [HPT_NBLK];
  hpt_tin_t                t_q [HPT_NTRIP];
  logic [HPT_NCOL-1:0]     cols;
  hpt_cand_t               hic [HPT_NBLK];
  hpt_cand_t               loc [HPT_NBLK];
  hpt_cand_t               hsel [2], lsel [2], hl [2];
  logic [HPT_NBLK-1:0]     m_valid;
  logic [4:0]              m_delta [HPT_NBLK];
  logic [4:0]              maxd;

  // ---------------- coarse delay and input buffer
  for (genvar k = 0; k < HPT_NBLK; k++) begin : g_dflat
    assign d_flat[k*DW +: DW] = din[k];
  end
  for (genvar k = 0; k < HPT_NTRIP; k++) begin : g_tflat
    assign t_flat[k*TW +: TW] = tin[k];
  end

  hpt_coarse_delay #(.W(HPT_NBLK*DW), .MAXDLY(CD_MAX)) u_cd_doublet (
    .clk(clk), .rst_n(rst_n), .dly(dly_doublet), .din(d_flat), .dout(d_dly));
  hpt_coarse_delay #(.W(HPT_NTRIP*TW), .MAXDLY(CD_MAX)) u_cd_triplet (
    .clk(clk), .rst_n(rst_n), .dly(dly_triplet), .din(t_flat), .dout(t_dly));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < HPT_NBLK; k++)  d_q[k] <= '0;
      for (int k = 0; k < HPT_NTRIP; k++) t_q[k] <= '0;
    end else begin
      for (int k = 0; k < HPT_NBLK; k++)  d_q[k] <= d_dly[k*DW +: DW];
      for (int k = 0; k < HPT_NTRIP; k++) t_q[k] <= t_dly[k*TW +: TW];
    end
  end

  // ---------------- triplet columns
  always_comb begin
    cols = '0;
    for (int t = 0; t < HPT_NTRIP; t++)
      if (t_q[t].valid && int'(t_q[t].col) < HPT_NCOL) cols[t_q[t].col] = 1'b1;
  end

  assign maxd = strip_mode ? 5'(HPT_MAXD_S) : 5'(HPT_MAXD_W);

  // ---------------- six matrix blocks
  for (genvar k = 0; k < HPT_NBLK; k++) begin : g_blk
    hpt_matrix_block #(.NPOS(HPT_POS_BLK), .MAXD(HPT_MAXD_W)) u_blk (
      .row_valid(d_q[k].valid),
      .row_pos  (d_q[k].pos),
      .cols     (cols[k*HPT_POS_BLK +: BCOL]),
      .maxd     (maxd),
      .valid    (m_valid[k]),
      .delta    (m_delta[k])
    );
    always_comb begin
      hic[k].valid = m_valid[k];
      hic[k].high  = 1'b1;
      hic[k].blk   = 3'(k);
      hic[k].pos   = d_q[k].pos;
      hic[k].delta = m_delta[k];
      loc[k].valid = d_q[k].valid && !m_valid[k];
      loc[k].high  = 1'b0;
      loc[k].blk   = 3'(k);
      loc[k].pos   = d_q[k].pos;
      loc[k].delta = {d_q[k].dlow[3], d_q[k].dlow};
    end
  end

  hpt_sel2of6 u_sel_high (.cand(hic), .sel(hsel));
  hpt_sel2of6 u_sel_low  (.cand(loc), .sel(lsel));
  hpt_hl_select u_hl (.hi(hsel), .lo(lsel), .out(hl));

  // ---------------- output buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out[0] <= '0;
      out[1] <= '0;
    end else begin
      out[0] <= hl[0];
      out[1] <= hl[1];
    end
  end
endmodule
