// crc_gen: 16-bit payload CRC generator and checker.
//
// A 16-bit Galois LFSR divides the payload bit stream by the CRC generator
// polynomial g(D) = D^16 + D^12 + D^5 + 1. Register position i holds the
// coefficient of D^i; the feedback bit (position 15 XOR data in) enters
// position 0 and is added into positions 5 and 12.
//
// Use, one bit per enabled clock edge (en = 1):
//   * init = 1 loads the eight left-most positions 0..7 with the UAP (or
//     DCI), UAP bit 0 in position 0, and clears the eight right-most
//     positions 8..15.
//   * rw = RW_WRITE shifts the payload bit din (LSB first) into the divider;
//     dout passes din through.
//   * rw = RW_READ shifts the register out right to left: dout is position
//     15, then 14 and so on, with feedback off. Sixteen read cycles deliver
//     the CRC behind the payload.
//   * zero is 1 while the register is all zero: a receiver that writes the
//     payload followed by its 16 CRC bits ends with zero = 1 when the check
//     passes.
// en = 0 holds the register (clock-gating point). rst_n clears it
// asynchronously.
//
// From the document: the polynomial, the UAP-and-zeros preload, the read-out
// order and the register/polynomial/read-write structure. This design's
// choices: the parallel preload, the din pass-through on writes, the zero
// flag and the asynchronous reset.
module crc_gen
  import bt_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,     // clock enable; 0 holds the register
  input  logic             init,   // load {8'h00, uap}
  input  logic [UAP_W-1:0] uap,    // UAP or DCI preload value
  input  rw_e              rw,     // RW_WRITE: shift din in; RW_READ: shift out
  input  logic             din,    // serial data in, payload LSB first
  output logic             dout,   // serial data out
  output logic             zero    // remainder is zero
);

  logic [CRC_W-1:0] lfsr_q;
  logic             fb;

  assign fb = lfsr_q[CRC_W-1] ^ din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= '0;
    end else if (en) begin
      if (init)
        lfsr_q <= {{(CRC_W-UAP_W){1'b0}}, uap};
      else if (rw == RW_WRITE)
        lfsr_q <= {lfsr_q[CRC_W-2:0], 1'b0} ^ ({CRC_W{fb}} & CRC_POLY);
      else
        lfsr_q <= {lfsr_q[CRC_W-2:0], 1'b0};
    end
  end

  assign dout = (rw == RW_READ) ? lfsr_q[CRC_W-1] : din;
  assign zero = (lfsr_q == '0);

endmodule
