// r8_regbank: the R8 general-purpose register bank, 16 registers of 16 bits.
//
// One write port and two read ports, all addressed straight from the
// instruction register:
//   - write: register IR[11:8] (the target) takes dtreg when wreg is 1,
//     through a 4-to-16 decoder enabled by wreg;
//   - S1: register IR[7:4] (source1);
//   - S2: register IR[3:0] (source2) when ms2 = 0, or register IR[11:8] (the
//     target) when ms2 = 1. This multiplexer sits inside the bank.
// Reads are combinational. Writes take place on the falling edge of ck,
// the edge on which the whole R8 datapath updates; reset (asynchronous,
// active high) clears every register.
// The structure (decoder, 16 registers, two 16-to-1 read multiplexers and the
// ms2 address multiplexer) follows the specification's block diagram; the
// asynchronous reset is this design's choice.
module r8_regbank
  import r8_pkg::*;
(
  input  logic  ck,
  input  logic  rst,
  input  word_t ir,     // instruction register: fields [11:8], [7:4], [3:0]
  input  logic  ms2,    // S2 address: 0 = IR[3:0], 1 = IR[11:8]
  input  logic  wreg,   // write enable
  input  word_t dtreg,  // write data
  output word_t s1,
  output word_t s2
);

  word_t regs [16];

  logic [3:0] a_t, a_s1, a_s2;
  logic [15:0] wdec;  // one-hot write decoder

  assign a_t  = ir[11:8];
  assign a_s1 = ir[7:4];
  assign a_s2 = ms2 ? ir[11:8] : ir[3:0];

  always_comb begin
    wdec = '0;
    if (wreg) wdec[a_t] = 1'b1;
  end

  always_ff @(negedge ck or posedge rst) begin
    if (rst) begin
      for (int r = 0; r < 16; r++) regs[r] <= '0;
    end else begin
      for (int r = 0; r < 16; r++)
        if (wdec[r]) regs[r] <= dtreg;
    end
  end

  assign s1 = regs[a_s1];
  assign s2 = regs[a_s2];

endmodule
