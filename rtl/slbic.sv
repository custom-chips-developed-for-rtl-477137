// slbic: slave-board chip. Low-pT trigger and level-1 readout for one slave board.
//
// The bunch-crossing-synchronised hit pattern from the patch panel takes two branches.
// Trigger branch: the pattern is registered, the trigger block (four schemes, chosen by the
// mode pins) finds the low-pT candidates and its result is registered again, so trig_out
// follows hit_in by two clocks. Readout branch: the registered hits, the trigger result and
// the crossing number of that crossing form a 194-bit record that enters the level-1 buffer
// every clock. A level-1 accept copies the accepted crossing with its two neighbours and the
// event number into the 16-deep derandomizer, and the local slave link transmitter sends the
// records out (303 clocks per event).
//
// Timing: crossing number and event number are counted inside the chip (bcr / ecr reset
// them). The accept for a crossing must be sampled latency+3 clock edges after the edge that
// sampled the crossing's hits at hit_in, where latency is the run-time setting of the
// level-1 buffer; the record carries the crossing number, so the alignment can be checked
// downstream.
//
// The two branches, the buffer, derandomizer and the four-line link follow the design
// description. Counter widths, the 3564-crossing orbit and the record layout
// {bcid, trigger, hits} are own choices from ATLAS conventions.
module slbic
  import tgc_pkg::*;
#(
  parameter int unsigned L1_DEPTH = 128,
  parameter int unsigned DR_DEPTH = 16,
  parameter int unsigned ORBIT    = 3564
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  slb_mode_e                   mode,
  input  logic [SLB_NIN-1:0]          hit_in,
  input  logic                        bcr,       // bunch counter reset
  input  logic                        ecr,       // event counter reset
  input  logic                        l1a,       // level-1 accept
  input  logic [$clog2(L1_DEPTH)-1:0] latency,
  output slb_trig_t                   trig_out,  // to the high-pT board
  output logic                        link_clk,
  output logic                        link_sync,
  output logic [1:0]                  link_data,
  output logic                        dr_overflow
);
  localparam int unsigned EW = L1ID_W + 3*SLB_RO_W;

  logic [SLB_NIN-1:0] hit_q, hit_qq;
  logic [BCID_W-1:0]  bcid, bc_q, bc_qq;
  logic [L1ID_W-1:0]  l1id;
  slb_trig_t          trig_c;
  logic [SLB_RO_W-1:0] rec, l1b_out;
  logic               dr_empty, dr_full, dr_rd;
  logic [EW-1:0]      dr_dout;
  logic               link_busy;

  slb_trigger u_trigger (.mode(mode), .hit(hit_q), .trig(trig_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_q    <= '0;
      hit_qq   <= '0;
      bc_q     <= '0;
      bc_qq    <= '0;
      trig_out <= '0;
      bcid     <= '0;
      l1id     <= '0;
    end else begin
      hit_q    <= hit_in;
      hit_qq   <= hit_q;
      bc_q     <= bcid;
      bc_qq    <= bc_q;
      trig_out <= trig_c;
      if (bcr || bcid == BCID_W'(ORBIT-1)) bcid <= '0;
      else                                  bcid <= bcid + 1'b1;
      if (ecr)      l1id <= '0;
      else if (l1a) l1id <= l1id + 1'b1;
    end
  end

  assign rec = {bc_qq, trig_out, hit_qq};

  slb_l1buffer #(.W(SLB_RO_W), .DEPTH(L1_DEPTH)) u_l1b (
    .clk(clk), .rst_n(rst_n), .latency(latency), .din(rec), .dout(l1b_out)
  );

  slb_derandomizer #(.W(SLB_RO_W), .IDW(L1ID_W), .DEPTH(DR_DEPTH)) u_derand (
    .clk(clk), .rst_n(rst_n), .l1b_out(l1b_out), .l1a(l1a), .l1id(l1id),
    .rd(dr_rd), .empty(dr_empty), .full(dr_full), .overflow(dr_overflow), .dout(dr_dout)
  );

  slb_link_tx #(.FW(EW)) u_link (
    .clk(clk), .rst_n(rst_n), .fifo_empty(dr_empty), .fifo_dout(dr_dout), .fifo_rd(dr_rd),
    .link_clk(link_clk), .link_sync(link_sync), .link_data(link_data), .busy(link_busy)
  );
endmodule
