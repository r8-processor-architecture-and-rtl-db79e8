// r8_mem_model: behavioural model of the external R8 memory (testbench only).
//
// 2**ADDR_W words of 16 bits, word addressed. Reads are combinational:
// rdata = MEM(address) whatever ce is. A write takes place on the falling
// edge of ck when ce = 1 and rw = 0, the edge on which the processor's
// datapath also updates. A loading port (ld_en, ld_addr, ld_data), written on
// the same edge and taking priority, lets a testbench place a program and
// data in memory while the processor is held in reset.
module r8_mem_model #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              ck,
  input  logic [ADDR_W-1:0] address,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  input  logic              ce,
  input  logic              rw,
  input  logic              ld_en,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [15:0]       ld_data
);

  logic [15:0] mem [2**ADDR_W];

  always_ff @(negedge ck) begin
    if (ld_en)            mem[ld_addr] <= ld_data;
    else if (ce && !rw)   mem[address] <= wdata;
  end

  assign rdata = mem[address];

endmodule
