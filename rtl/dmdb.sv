// dmdb: Data Memory Decoder Block.
//
// Forms the 9-bit data memory address and steers data between the core's
// own registers and the external RAM. For a direct access the address is
// {RP1, RP0, f} with f = pmdb(6..0); when f is 0 (INDF) the access is
// indirect and the address is {IRP, FSR}. The low seven address bits select
// the registers held in the core in every bank: INDF (0x00), PCL (0x02),
// STATUS (0x03), FSR (0x04) and PCLATH (0x0A). Any other address goes to
// RAM: rd_n / wr_n are pulled low while rd / wr are high. For registers in
// the core a write raises the matching write enable instead, and a read
// returns the register. INDF reached through FSR = 0 reads 0 and is not
// written. The output dmdb_in feeds ALU input B; when b_lit is high it
// carries the instruction literal pmdb(7..0) instead. Purely
// combinational. The inputs and the 9-bit address are those of the
// datapath drawing; the register map follows the instruction set the core
// implements.
module dmdb
  import mcu_pkg::*;
(
  input  logic [6:0] f,         // pmdb(6..0)
  input  logic [2:0] bank,      // status(7..5): IRP, RP1, RP0
  input  logic [7:0] fsr,
  input  logic [7:0] pcl,
  input  logic [7:0] status,
  input  logic [4:0] pclath,
  input  logic [7:0] mem_in,    // dmdb_in_mem
  input  logic [7:0] literal,   // pmdb(7..0)
  input  logic       b_lit,
  input  logic       rd,
  input  logic       wr,
  output logic [8:0] dmab,
  output logic       rd_n,
  output logic       wr_n,
  output logic [7:0] dmdb_in,
  output logic       status_we,
  output logic       fsr_we,
  output logic       pclath_we,
  output logic       pcl_we
);

  logic       indirect;
  logic [6:0] low;
  logic       internal;

  always_comb begin
    indirect = (f == ADDR_INDF);
    dmab     = indirect ? {bank[2], fsr} : {bank[1:0], f};
    low      = dmab[6:0];
    internal = (low == ADDR_INDF) || (low == ADDR_PCL) || (low == ADDR_STATUS) ||
               (low == ADDR_FSR)  || (low == ADDR_PCLATH);

    rd_n      = !(rd && !internal);
    wr_n      = !(wr && !internal);
    pcl_we    = wr && (low == ADDR_PCL);
    status_we = wr && (low == ADDR_STATUS);
    fsr_we    = wr && (low == ADDR_FSR);
    pclath_we = wr && (low == ADDR_PCLATH);

    if (b_lit) dmdb_in = literal;
    else begin
      unique case (low)
        ADDR_INDF:   dmdb_in = '0;
        ADDR_PCL:    dmdb_in = pcl;
        ADDR_STATUS: dmdb_in = status;
        ADDR_FSR:    dmdb_in = fsr;
        ADDR_PCLATH: dmdb_in = {3'b000, pclath};
        default:     dmdb_in = mem_in;
      endcase
    end
  end

endmodule
