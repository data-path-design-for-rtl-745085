// Pack unit of the PACK instruction: two 2:1 multiplexers.
//   Rd.H = sel_s ? Rs.H : Rs.L      Rd.L = sel_t ? Rt.H : Rt.L
// sel_s is the first half of the funct field (bit 5 is used), sel_t the
// last half (bit 2 is used). Purely combinational.
module pack_unit (
  input  logic [31:0] rs,
  input  logic [31:0] rt,
  input  logic        sel_s,
  input  logic        sel_t,
  output logic [31:0] rd
);
  assign rd[31:16] = sel_s ? rs[31:16] : rs[15:0];
  assign rd[15:0]  = sel_t ? rt[31:16] : rt[15:0];
endmodule
