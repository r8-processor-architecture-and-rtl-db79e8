// r8_processor: the R8 processor, control unit plus datapath.
//
// A multi-cycle 16-bit load-store processor: every instruction takes 2 to 4
// clock cycles (fetch, register read, ALU, and an optional execute/write
// cycle). The control unit (r8_control) changes state on the rising edge of
// ck and drives the 18-signal microinstruction; the datapath (r8_datapath)
// executes it on the falling edge. The datapath returns IR and the flags to
// the control unit. Reset (active high, asynchronous) clears every register;
// after reset the first instruction is fetched from address 0000h.
//
// External memory interface (word addressed, 16-bit words):
//   address   memory address
//   ce        1 when a memory transfer takes place in this cycle
//   rw        1 = read, 0 = write (valid when ce = 1)
//   data_in   read data; the memory must present MEM(address) during the
//             cycle (combinational read): it is sampled on the falling edge
//   data_out  write data; the memory stores it on the falling edge ending
//             a cycle with ce = 1 and rw = 0
// The specification uses one bidirectional data bus; this design splits it
// into data_in and data_out, which a pad or top level can recombine with a
// tristate driver enabled by ce and not rw.
module r8_processor
  import r8_pkg::*;
(
  input  logic  ck,
  input  logic  rst,
  output word_t address,
  input  word_t data_in,
  output word_t data_out,
  output logic  ce,
  output logic  rw
);

  uins_t  uins;
  word_t  ir;
  flags_t flag;

  r8_datapath u_dp (
    .ck      (ck),
    .rst     (rst),
    .uins    (uins),
    .ir      (ir),
    .flags   (flag),
    .address (address),
    .data_in (data_in),
    .data_out(data_out)
  );

  r8_control u_ctrl (
    .ck   (ck),
    .rst  (rst),
    .ir   (ir),
    .flags(flag),
    .uins (uins)
  );

  assign ce = uins.ce;
  assign rw = uins.rw;

  // the fetch cycle is always a memory read
  a_fetch_reads: assert property (@(negedge ck) uins.wir |-> (uins.ce && uins.rw));

endmodule
