// ar3_memory: the AR3's 256 x 8-bit internal memory with its address register.
//
// Program and data share this one byte-wide memory (256 addresses of one
// byte, as the processor description gives). Instructions are 16 bits wide
// and stored big-endian: the opcode byte at the lower address. Because the
// processor has one internal bus, the address is first latched from the bus
// into a memory address register (MAR, this design's choice), then the byte
// at MAR is read onto the bus or written from it.
//
// Timing: mar_ld and wr act on the rising clock edge; rdata follows MAR
// combinationally, so a read occupies the cycle after the MAR load.
// The prog_* port writes a byte directly (used to load a program while the
// controller is held in reset) and has priority over wr. dbg_addr/dbg_data
// is a second, read-only port for observing memory from outside.
module ar3_memory
  import ar3_pkg::*;
#(
  parameter int unsigned DEPTH = 2 ** ADDR_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  byte_t                    bus,       // internal bus (address or write data)
  input  logic                     mar_ld,    // MAR <- bus
  input  logic                     wr,        // mem[MAR] <- bus
  output byte_t                    rdata,     // mem[MAR]
  input  logic                     prog_we,   // external load port
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  byte_t                    prog_data,
  input  logic [$clog2(DEPTH)-1:0] dbg_addr,  // external read port
  output byte_t                    dbg_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  byte_t          mem [DEPTH];
  logic [AW-1:0]  mar;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      mar <= '0;
    else if (mar_ld) mar <= bus[AW-1:0];
  end

  always_ff @(posedge clk) begin
    if (prog_we)  mem[prog_addr] <= prog_data;
    else if (wr)  mem[mar]       <= bus;
  end

  assign rdata    = mem[mar];
  assign dbg_data = mem[dbg_addr];

endmodule
