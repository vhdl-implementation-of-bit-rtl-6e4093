// data_whitening: Bluetooth data whitening / de-whitening.
//
// A 7-bit LFSR with generator g(D) = D^7 + D^4 + 1 produces the whitening
// sequence; the bit leaving position 6 is XORed with each data bit. On every
// running edge position 6 feeds flip-flop 0 and, through an XOR, position 4
// (the XOR sits between flip-flop 3 and flip-flop 4); the other bits move one
// position right. The same block de-whitens at the receiver.
//
// Ports follow the block symbol of the document: Datain (din), R/W_bar (rw),
// Datainz (dinz), Clk (clk), Enable (en) and Dataout (dout); rst_n is added.
//   * rw = RW_WRITE, en = 1: initialisation. The feedback and the XOR are
//     bypassed and dinz is shifted into position 0. Seven writes in the order
//     1, CLK6, CLK5, ..., CLK1 leave CLK1 in position 0, CLK6 in position 5
//     and 1 in position 6. dout = din.
//   * rw = RW_READ, en = 1: dout = din XOR position 6 (combinational), and
//     the LFSR steps on the edge. The first data bit is the header LSB.
//   * en = 0: the LFSR is paused (the clock-gating point of the block) and
//     dout still depends on rw alone: in read mode it is din XOR the held
//     position 6, so an output bit stays valid while the chain is stalled;
//     in write mode it is din unwhitened, which serves the stretches of a
//     packet that are not whitened. Whitening resumes from the held state.
// No re-initialisation happens between header and payload: the caller just
// keeps it in read mode.
//
// From the document: polynomial, tap placement, initial state, read order,
// the bypass of feedback during initialisation and the pause. This design's
// choices: dout during initialisation and pauses, and the asynchronous reset.
module data_whitening
  import bt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,     // Enable: 0 pauses the LFSR
  input  rw_e  rw,     // R/W_bar: RW_WRITE initialises, RW_READ whitens
  input  logic din,    // Datain: bit to whiten
  input  logic dinz,   // Datainz: serial initialisation bit
  output logic dout    // Dataout: whitened bit
);

  logic [WHT_W-1:0] lfsr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= '0;
    end else if (en) begin
      if (rw == RW_WRITE)
        lfsr_q <= {lfsr_q[WHT_W-2:0], dinz};
      else
        lfsr_q <= {lfsr_q[WHT_W-2:0], 1'b0} ^ ({WHT_W{lfsr_q[WHT_W-1]}} & WHT_POLY);
    end
  end

  assign dout = din ^ ((rw == RW_READ) & lfsr_q[WHT_W-1]);

endmodule
