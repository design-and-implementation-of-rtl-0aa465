// ahb_addr_mux: address and control multiplexer.
//
// Puts the address and control signals (HADDR, HTRANS, HWRITE, HSIZE,
// HBURST) of the master that owns the address phase on the shared bus.
// hmaster is the owner's number, 1..N_MASTERS; 0 means no owner and drives an
// IDLE transfer at address 0. Purely combinational. The mux itself belongs to
// the design; selecting with HMASTER and the idle default are this
// implementation's choices.
module ahb_addr_mux
  import ahb_pkg::*;
#(
  parameter int unsigned N_MASTERS = 3,
  localparam int unsigned MW       = $clog2(N_MASTERS + 1)
) (
  input  logic [MW-1:0] hmaster,
  input  ahb_ctrl_t     m_ctrl [N_MASTERS],
  output ahb_ctrl_t     ctrl
);

  always_comb begin
    ctrl = '0;
    for (int i = 0; i < N_MASTERS; i++)
      if (hmaster == MW'(i + 1)) ctrl = m_ctrl[i];
  end

endmodule
