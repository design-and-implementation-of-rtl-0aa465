// ahb_decoder: central address decoder.
//
// Each slave owns one 2**SEL_LSB-unit region of the address map, chosen by
// the address bits just above SEL_LSB: with the defaults, HADDR[9:8] = 0..3
// selects slave 1..4. This places slave 1 at 0x000-0x0FF, slave 2 at
// 0x100-0x1FF, slave 3 at 0x200-0x2FF and slave 4 at 0x300-0x3FF, which holds
// the burst start addresses of the reference design (160, 416, 672, 928).
// Higher address bits are ignored, so the map repeats every 1024 units.
// Purely combinational: hsel is one-hot, sel is the selected slave's index
// (0-based) for the read data mux. The bit positions are this
// implementation's choice.
module ahb_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4,
  parameter int unsigned SEL_LSB  = 8,
  localparam int unsigned SW      = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1
) (
  input  logic [ADDR_W-1:0]   haddr,
  output logic [N_SLAVES-1:0] hsel,
  output logic [SW-1:0]       sel
);

  assign sel = haddr[SEL_LSB +: SW];

  always_comb
    for (int i = 0; i < N_SLAVES; i++) hsel[i] = (sel == SW'(i));

endmodule
