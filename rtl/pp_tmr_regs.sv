// pp_tmr_regs: configuration registers of the patch-panel chip, protected against single
// event upsets.
//
// Every register is held in three copies. A write sets all three; reads and the outputs
// `q` deliver the bitwise majority of the copies, so one upset copy never reaches the logic.
// Each clock the majority is written back into all copies (scrubbing), so an upset is
// repaired one clock after it happens and cannot pile up with a later one. `seu_seen` pulses
// for one clock when a disagreement between the copies was repaired.
//
// `inj_*` is a test input that flips bits of one copy, the way a particle hit would, so the
// protection can be exercised; tie inj_en low in normal use.
//
// SEU-tolerant register access in the patch-panel chip follows the design description;
// triplication with voting and scrubbing, the register count and the bus are own choices.
module pp_tmr_regs #(
  parameter int unsigned NREG = 4,
  parameter int unsigned W    = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] addr,
  input  logic [W-1:0]            wdata,
  output logic [W-1:0]            rdata,
  output logic [W-1:0]            q [NREG],
  output logic                    seu_seen,
  input  logic                    inj_en,
  input  logic [1:0]              inj_copy,
  input  logic [$clog2(NREG)-1:0] inj_addr,
  input  logic [W-1:0]            inj_mask
);
  logic [W-1:0] c0 [NREG], c1 [NREG], c2 [NREG];
  logic [W-1:0] vote [NREG], nv [NREG];
  logic         mismatch;

  always_comb begin
    mismatch = 1'b0;
    for (int r = 0; r < NREG; r++) begin
      vote[r] = (c0[r] & c1[r]) | (c1[r] & c2[r]) | (c0[r] & c2[r]);
      if (c0[r] != c1[r] || c1[r] != c2[r]) mismatch = 1'b1;
    end
  end

  // next value of every copy: the written word, or the voted value (scrubbing)
  always_comb
    for (int r = 0; r < NREG; r++)
      nv[r] = (we && addr == ($clog2(NREG))'(r)) ? wdata : vote[r];

  assign q     = vote;
  assign rdata = vote[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) begin
        c0[r] <= '0;
        c1[r] <= '0;
        c2[r] <= '0;
      end
      seu_seen <= 1'b0;
    end else begin
      seu_seen <= mismatch;
      for (int r = 0; r < NREG; r++) begin
        c0[r] <= nv[r] ^ ((inj_en && inj_copy == 2'd0 && inj_addr == ($clog2(NREG))'(r)) ? inj_mask : '0);
        c1[r] <= nv[r] ^ ((inj_en && inj_copy == 2'd1 && inj_addr == ($clog2(NREG))'(r)) ? inj_mask : '0);
        c2[r] <= nv[r] ^ ((inj_en && inj_copy == 2'd2 && inj_addr == ($clog2(NREG))'(r)) ? inj_mask : '0);
      end
    end
  end
endmodule
