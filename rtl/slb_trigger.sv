// slb_trigger: trigger block of the slave-board chip, with its four trigger schemes.
//
// The same SLB_NIN input pins carry a different hit pattern in each mode, chosen by the two
// select pins (triplet/doublet, strip/wire):
//   doublet wire/strip : hit[63:0] pivot plane, hit[141:64] reference plane (78 channels,
//                        reference channel c on bit 64+c, pivot channel p matches reference
//                        p+d at bit 64+p+7+d). Two matrix halves A (pivot 0..31) and
//                        B (pivot 32..63), each with primary encoder, feedback, decluster and
//                        encoders; slot 0/1 = half A/B, data = {delta[3:0], pos[4:0]}.
//   triplet wire       : hit[35:0], [71:36], [107:72] = planes 1..3, 2-out-of-3, up to
//                        three candidates in slots 0..2, data = channel 0..35.
//   triplet strip      : hit[31:0] inner, hit[63:32] outer plane, OR, two logics with two
//                        candidates each in slots 0..3, data = channel 0..31.
// Combinational; the chip registers the output.
//
// The four schemes and the doublet structure (Fig. 3 of the design description) are the
// document's; the pin assignment of each mode and the slot layout are own choices.
module slb_trigger
  import tgc_pkg::*;
(
  input  slb_mode_e          mode,
  input  logic [SLB_NIN-1:0] hit,
  output slb_trig_t          trig
);
  // ---------------- doublet: two matrix halves
  logic [SLB_NPIV-1:0] piv;
  logic [SLB_NREF-1:0] rf;
  logic [SLB_NBLK-1:0]  m_valid;
  logic [3:0]           m_delta [SLB_NBLK];
  logic [SLB_PIV_BLK-1:0] m_rows [SLB_NBLK];
  logic [4:0]           d_pos   [SLB_NBLK];
  logic [SLB_NBLK-1:0]  d_valid;

  assign piv = hit[SLB_NPIV-1:0];
  assign rf  = hit[SLB_NIN-1:SLB_NPIV];

  for (genvar b = 0; b < SLB_NBLK; b++) begin : g_half
    slb_matrix u_matrix (
      .pivot  (piv[b*SLB_PIV_BLK +: SLB_PIV_BLK]),
      .refer  (rf[b*SLB_PIV_BLK +: SLB_PIV_BLK+2*SLB_MAXD]),
      .valid  (m_valid[b]),
      .delta  (m_delta[b]),
      .row_hit(m_rows[b])
    );
    slb_decluster #(.N(SLB_PIV_BLK)) u_declust (
      .hits (m_rows[b]),
      .valid(d_valid[b]),
      .pos  (d_pos[b])
    );
  end

  // ---------------- triplet wire
  logic [2:0] tw_valid;
  logic [5:0] tw_pos [3];
  slb_triplet_wire #(.NCH(SLB_TW_NCH), .NCAND(3)) u_tw (
    .pa   (hit[0 +: SLB_TW_NCH]),
    .pb   (hit[SLB_TW_NCH +: SLB_TW_NCH]),
    .pc   (hit[2*SLB_TW_NCH +: SLB_TW_NCH]),
    .valid(tw_valid),
    .pos  (tw_pos)
  );

  // ---------------- triplet strip
  logic [3:0] ts_valid;
  logic [4:0] ts_pos [4];
  slb_triplet_strip #(.NCH(SLB_TS_NCH), .NCAND(2)) u_ts (
    .inner(hit[0 +: SLB_TS_NCH]),
    .outer(hit[SLB_TS_NCH +: SLB_TS_NCH]),
    .valid(ts_valid),
    .pos  (ts_pos)
  );

  always_comb begin
    trig = '0;
    unique case (mode)
      MODE_DOUBLET_WIRE, MODE_DOUBLET_STRIP: begin
        for (int b = 0; b < SLB_NBLK; b++) begin
          trig[b].valid = m_valid[b] & d_valid[b];
          trig[b].data  = {m_delta[b], d_pos[b]};
        end
      end
      MODE_TRIPLET_WIRE: begin
        for (int c = 0; c < 3; c++) begin
          trig[c].valid = tw_valid[c];
          trig[c].data  = SLB_DW'(tw_pos[c]);
        end
      end
      MODE_TRIPLET_STRIP: begin
        for (int c = 0; c < 4; c++) begin
          trig[c].valid = ts_valid[c];
          trig[c].data  = SLB_DW'(ts_pos[c]);
        end
      end
      default: trig = '0;
    endcase
  end
endmodule
