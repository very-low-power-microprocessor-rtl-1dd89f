// status_reg: STATUS register.
//
// Bit layout IRP RP1 RP0 TO PD Z DC C. The ALU flags Z, DC and C are loaded
// on the rising core-clock edge at the end of Q3 for each bit set in
// flags_en. A file write to address 0x03 (we) loads IRP, RP1, RP0 and those
// of Z, DC, C that the same instruction does not update as flags; TO and PD
// are read-only to software: pd_clr (SLEEP) clears PD and sets TO, wdt_clr
// (CLRWDT) sets both. IRP, RP1, RP0 go to the DMDB as the bank bits
// status(7..5), as the datapath drawing shows. The layout and the TO/PD
// rules follow the instruction set this core implements; the reset value
// 0x18 (TO = PD = 1, the rest 0) is this design's choice.
module status_reg
  import mcu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  flags_t     flags_en,
  input  flags_t     flags,
  input  logic       we,
  input  logic [7:0] d,
  input  logic       pd_clr,
  input  logic       wdt_clr,
  output logic [7:0] q
);

  logic [7:0] nxt;

  always_comb begin
    nxt = q;
    if (we) begin
      nxt[ST_IRP:ST_RP0] = d[ST_IRP:ST_RP0];
      nxt[ST_Z:ST_C]     = d[ST_Z:ST_C];
    end
    if (flags_en.z)  nxt[ST_Z]  = flags.z;
    if (flags_en.dc) nxt[ST_DC] = flags.dc;
    if (flags_en.c)  nxt[ST_C]  = flags.c;
    if (pd_clr) begin
      nxt[ST_PD] = 1'b0;
      nxt[ST_TO] = 1'b1;
    end
    if (wdt_clr) begin
      nxt[ST_PD] = 1'b1;
      nxt[ST_TO] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= STATUS_RESET;
    else        q <= nxt;
  end

endmodule
