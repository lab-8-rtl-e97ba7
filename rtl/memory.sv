// memory: the 256 x 8 program and data memory with its output port.
//
// Reads are asynchronous: rdata always shows the byte at addr, so that a
// value read in one cycle is latched by IRX, MAR, PC or ACCA on the next
// clock edge, as the fetch and execute sequences require. Writes are
// synchronous: on a rising edge with mem_w_n low, wdata (from ACCA) is
// stored at addr.
//
// Output port: a write to address OUT_ADDR (0xFF) also updates the
// out_port register, which drives the system's output port. The block
// diagram shows the port coming out of the memory but not how it is
// addressed; mapping it to the top address is this design's choice.
//
// Program loading: while the computer is held in reset, an external host
// writes the memory through the ld_we/ld_addr/ld_data port (synchronous,
// active high). This port is this design's own addition: the description
// does not say how programs are placed in memory. The memory itself has
// no reset; out_port is cleared by reset.
module memory
  import ccu_pkg::*;
#(
  parameter int unsigned DEPTH    = 256,
  parameter addr_t       OUT_ADDR = 8'hFF
) (
  input  logic  clk,
  input  logic  reset_n,
  input  addr_t addr,
  input  data_t wdata,
  input  logic  mem_w_n,
  output data_t rdata,
  input  logic  ld_we,
  input  addr_t ld_addr,
  input  data_t ld_data,
  output data_t out_port
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_we)         mem[ld_addr] <= ld_data;
    else if (!mem_w_n) mem[addr]    <= wdata;
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)                          out_port <= '0;
    else if (!mem_w_n && addr == OUT_ADDR) out_port <= wdata;
  end

  assign rdata = mem[addr];

endmodule
