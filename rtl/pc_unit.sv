// pc_unit: Program Counter (PC).
//
// A 13-bit register that addresses the program memory (pmab). On each
// rising core-clock edge it takes at most one of these actions, in priority
// order: ret loads the return address from the STACK; jump loads
// {PCLATH[4:3], k[10:0]} for GOTO and CALL; pcl_wr loads
// {PCLATH[4:0], data} when an instruction writes the PCL register (computed
// jumps); inc adds one. The low byte is readable as PCL through the DMDB.
// The widths and the sources of the high bits follow the datapath drawing;
// the priority order is this design's choice (the Control Block never
// requests two loads at once).
module pc_unit #(
  parameter int unsigned PCW = 13
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           inc,
  input  logic           jump,
  input  logic           ret,
  input  logic           pcl_wr,
  input  logic [10:0]    k,        // pmdb(10..0)
  input  logic [4:0]     pclath,   // PCLatH(4..0)
  input  logic [7:0]     data,     // dmdb_out
  input  logic [PCW-1:0] stack_top,
  output logic [PCW-1:0] pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pc <= '0;
    else if (ret)    pc <= stack_top;
    else if (jump)   pc <= PCW'({pclath[4:3], k});
    else if (pcl_wr) pc <= PCW'({pclath, data});
    else if (inc)    pc <= pc + 1'b1;
  end

endmodule
