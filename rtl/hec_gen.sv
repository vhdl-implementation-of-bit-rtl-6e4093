// hec_gen: header error check (HEC) generator and checker.
//
// An 8-bit Galois LFSR divides the header bit stream by the HEC generator
// polynomial g(D) = (D + 1)(D^7 + D^4 + D^3 + D^2 + 1). Register position i
// holds the coefficient of D^i; the feedback bit (position 7 XOR data in)
// is added into every position whose coefficient in g(D) is 1 (0, 1, 2, 5, 7).
//
// Use, one bit per enabled clock edge (en = 1):
//   * init = 1 loads the 8-bit UAP (or DCI) in parallel, UAP bit 0 into the
//     left-most position 0 and bit 7 into the right-most position 7.
//   * rw = RW_WRITE shifts the data bit din (LSB of the header first) into
//     the divider; dout then passes din straight through, so the transmit
//     stream carries the header bits themselves.
//   * rw = RW_READ shifts the register out right to left: dout is position 7,
//     and on the edge every bit moves one position right with feedback off,
//     so the next bit out is the one that was in position 6.
//   * zero is 1 while the register is all zero. A receiver that loads the
//     same UAP and writes the 10 header bits followed by the 8 HEC bits ends
//     with zero = 1 when no error was detected.
// en = 0 holds the register (the clock-gating point of the block: all state
// changes are qualified by en). rst_n clears the register asynchronously.
//
// From the document: the polynomial, the preload order, the read-out order
// and the split into a register array with polynomial and read/write logic.
// This design's choices: the parallel preload input, the pass-through of din
// during writes, the zero flag and the asynchronous reset.
module hec_gen
  import bt_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,     // clock enable; 0 holds the register
  input  logic             init,   // load uap into the register
  input  logic [UAP_W-1:0] uap,    // UAP or DCI preload value
  input  rw_e              rw,     // RW_WRITE: shift din in; RW_READ: shift out
  input  logic             din,    // serial data in, header LSB first
  output logic             dout,   // serial data out
  output logic             zero    // remainder is zero
);

  logic [HEC_W-1:0] lfsr_q;
  logic             fb;

  assign fb = lfsr_q[HEC_W-1] ^ din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= '0;
    end else if (en) begin
      if (init)
        lfsr_q <= uap;
      else if (rw == RW_WRITE)
        lfsr_q <= {lfsr_q[HEC_W-2:0], 1'b0} ^ ({HEC_W{fb}} & HEC_POLY);
      else
        lfsr_q <= {lfsr_q[HEC_W-2:0], 1'b0};
    end
  end

  assign dout = (rw == RW_READ) ? lfsr_q[HEC_W-1] : din;
  assign zero = (lfsr_q == '0);

endmodule
