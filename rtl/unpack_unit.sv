// Unpack unit of the UNPACK instruction: four 2:1 multiplexers.
//
// One 16-bit half of Rd (src_h: 1 = Rd.H, 0 = Rd.L) is placed into one half
// of the target register (put_h: 1 = high half, 0 = low half); the other
// half of the target keeps the value read from it, so the result is a
// whole, valid 32-bit word:
//   y.H = put_h ? (src_h ? Rd.H : Rd.L) : T.H
//   y.L = put_h ? T.L : (src_h ? Rd.H : Rd.L)
// Purely combinational.
module unpack_unit (
  input  logic [31:0] rd,
  input  logic [31:0] tgt,
  input  logic        put_h,
  input  logic        src_h,
  output logic [31:0] y
);
  logic [15:0] half;
  assign half      = src_h ? rd[31:16] : rd[15:0];
  assign y[31:16]  = put_h ? half : tgt[31:16];
  assign y[15:0]   = put_h ? tgt[15:0] : half;
endmodule
