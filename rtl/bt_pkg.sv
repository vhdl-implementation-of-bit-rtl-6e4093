// bt_pkg: constants and types shared by the Bluetooth bitstream datapath.
//
// The three generator polynomials are those of the Bluetooth baseband:
//   HEC        g(D) = (D + 1)(D^7 + D^4 + D^3 + D^2 + 1) = D^8 + D^7 + D^5 + D^2 + D + 1
//   CRC        g(D) = D^16 + D^12 + D^5 + 1
//   whitening  g(D) = D^7 + D^4 + 1
// Each is stored without its leading term: bit i is the coefficient of D^i,
// which is also the register position that receives the feedback bit.
// The packet field lengths (10-bit header info, 8-bit HEC, 16-bit CRC, 8-bit
// UAP, clock bits CLK6..CLK1) are the standard's and are used here as given.
package bt_pkg;

  localparam int unsigned HEC_W   = 8;
  localparam int unsigned CRC_W   = 16;
  localparam int unsigned WHT_W   = 7;
  localparam int unsigned UAP_W   = 8;
  localparam int unsigned HDR_W   = 10;

  localparam logic [HEC_W-1:0] HEC_POLY = 8'hA7;     // D^7 + D^5 + D^2 + D + 1 (+ D^8)
  localparam logic [CRC_W-1:0] CRC_POLY = 16'h1021;  // D^12 + D^5 + 1 (+ D^16)
  localparam logic [WHT_W-1:0] WHT_POLY = 7'h11;     // D^4 + 1 (+ D^7)

  // Mode of a read/write bit-process block (R/W_bar input of the document's
  // blocks): WRITE shifts data into the register, READ shifts the result out.
  typedef enum logic {
    RW_WRITE = 1'b0,
    RW_READ  = 1'b1
  } rw_e;

endpackage
