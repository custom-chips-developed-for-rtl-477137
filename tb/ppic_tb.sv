// ppic_tb: patch-panel chip through its register bus: sets the channel mask, checks bunch
// crossing identification of hits one clock later, programs and fires a test pulse, reads
// the registers back, runs 3000 clocks of random hits, register writes and test-pulse
// requests against a clock-by-clock model, and upsets a register copy to see it flagged and
// masked.
module ppic_tb;
  import tgc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PP_NCH-1:0]   hit_in, hit_out, tp_out;
  logic                tp_req, reg_we, seu_seen, inj_en;
  logic [PP_AW-1:0]    reg_addr, inj_addr;
  logic [1:0]          inj_copy;
  logic [PP_REG_W-1:0] reg_wdata, reg_rdata, inj_mask;
  int checks = 0, failures = 0, n_seu = 0;

  ppic dut (.clk(clk), .rst_n(rst_n), .hit_in(hit_in), .hit_out(hit_out), .tp_req(tp_req), .tp_out(tp_out),
    .reg_we(reg_we), .reg_addr(reg_addr), .reg_wdata(reg_wdata), .reg_rdata(reg_rdata),
    .seu_seen(seu_seen), .inj_en(inj_en), .inj_copy(inj_copy), .inj_addr(inj_addr), .inj_mask(inj_mask));

  always #5 clk = ~clk;
  always @(posedge clk) if (seu_seen) n_seu++;

  task automatic wr(logic [PP_AW-1:0] a, logic [PP_REG_W-1:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic chk(string what, logic [PP_REG_W-1:0] got, logic [PP_REG_W-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hit_in = '0; tp_req = 0; reg_we = 0; reg_addr = 0; reg_wdata = 0; inj_en = 0; inj_copy = 0; inj_addr = 0; inj_mask = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(PP_REG_MASK,   16'h00ff);
    wr(PP_REG_TPMASK, 16'h0f0f);
    wr(PP_REG_TPDLY,  16'd5);
    wr(PP_REG_CTRL,   16'd1);
    reg_addr = PP_REG_MASK; #1; chk("read mask", reg_rdata, 16'h00ff);
    reg_addr = PP_REG_TPDLY; #1; chk("read delay", reg_rdata, 16'd5);
    // hits: long pulses on all channels, only enabled ones pass, once, one clock later
    @(negedge clk); hit_in = 16'hffff;
    @(negedge clk); chk("bcid first crossing", hit_out, 16'h00ff);
    @(negedge clk); chk("bcid held pulse", hit_out, 16'h0000);
    hit_in = '0;
    // test pulse: request sampled at the next edge, pulse delay+1 = 6 clock edges after it
    @(negedge clk); tp_req = 1;
    @(negedge clk); tp_req = 0;
    for (int k = 1; k <= 8; k++) begin
      chk($sformatf("test pulse clock %0d", k), tp_out, (k == 7) ? 16'h0f0f : 16'h0000);
      @(negedge clk);
    end
    // random phase: changing hits, register writes and test-pulse requests every clock,
    // against a clock-by-clock model (leading edge & mask; pulse D+1 edges after a request)
    begin
      logic [PP_NCH-1:0]   m_prev, m_out, m_tp;
      logic [PP_REG_W-1:0] m_mask, m_tpmask, m_dly;
      int                  edge_no, fire_at;
      bit                  pend;
      m_prev = '0; m_mask = 16'h00ff; m_tpmask = 16'h0f0f; m_dly = 16'd5;
      m_out = '0; m_tp = '0; pend = 0; fire_at = 0; edge_no = 0;
      @(negedge clk);
      for (int i = 0; i < 3000; i++) begin
        if (i > 0) begin
          chk("random bcid", hit_out, m_out);
          chk("random test pulse", tp_out, m_tp);
        end
        // new inputs for the coming edge
        for (int c = 0; c < PP_NCH; c++) if ($urandom_range(3) == 0) hit_in[c] = ~hit_in[c];
        tp_req = ($urandom_range(19) == 0);
        reg_we = ($urandom_range(24) == 0);
        reg_addr = PP_AW'($urandom_range(2));
        reg_wdata = (reg_addr == PP_REG_TPDLY) ? PP_REG_W'($urandom_range(12)) : PP_REG_W'($urandom);
        // what the coming edge does, with the settings held before it
        edge_no++;
        m_out = hit_in & ~m_prev & m_mask;
        m_prev = hit_in;
        m_tp = '0;
        if (pend && edge_no == fire_at) begin m_tp = m_tpmask; pend = 0; end
        else if (!pend && tp_req) begin pend = 1; fire_at = edge_no + int'(m_dly[7:0]) + 1; end
        if (reg_we) case (reg_addr)
          PP_REG_MASK:   m_mask   = reg_wdata;
          PP_REG_TPMASK: m_tpmask = reg_wdata;
          PP_REG_TPDLY:  m_dly    = reg_wdata;
          default: ;
        endcase
        @(negedge clk);
      end
      chk("random bcid", hit_out, m_out);
      chk("random test pulse", tp_out, m_tp);
      hit_in = '0; tp_req = 0; reg_we = 0;
      repeat (20) @(negedge clk);
      wr(PP_REG_MASK, 16'h00ff);
    end
    // upset one copy of the mask register
    inj_en = 1; inj_copy = 2; inj_addr = PP_REG_MASK; inj_mask = 16'hffff;
    @(negedge clk); inj_en = 0;
    reg_addr = PP_REG_MASK; #1; chk("mask after upset", reg_rdata, 16'h00ff);
    repeat (3) @(negedge clk);
    reg_addr = PP_REG_MASK; #1; chk("mask after repair", reg_rdata, 16'h00ff);
    checks++; if (n_seu == 0) begin failures++; $display("FAIL upset not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
