// Shared helpers for four-phase dual-rail (1-of-2) signals.
// A bit is carried on a true rail t and a false rail f: 00 is the empty
// spacer, 10 is a valid 1, 01 is a valid 0, 11 never occurs.
`ifndef DR_MACROS_SVH
`define DR_MACROS_SVH
// every bit of the vector carries a valid value
`define DR_VALID(t, f) (&((t) | (f)))
// every bit of the vector is back to the empty spacer
`define DR_EMPTY(t, f) (~|((t) | (f)))
// encode a single-rail value x on the true and false rails when v is 1,
// otherwise drive the empty spacer
`define DR_ENC_T(v, x) ({$bits(x){(v)}} & (x))
`define DR_ENC_F(v, x) ({$bits(x){(v)}} & ~(x))
`endif
