// ahb_rdata_mux: read data and response multiplexer.
//
// Returns HRDATA, HREADY and HRESP of the slave that owns the data phase to
// all masters. The decoder's selection belongs to the address phase, so the
// mux registers it on every edge where the bus HREADY (its own output) is 1
// and selects with that copy. After reset (synchronous, active low) slave 1
// is selected; it answers an idle bus with HREADY=1 and OKAY. The design names
// a read data mux; routing HREADY and HRESP through it and the registered
// selection are this implementation's choices.
module ahb_rdata_mux
  import ahb_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4,
  localparam int unsigned SW      = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [SW-1:0] sel,
  input  ahb_resp_t s_resp [N_SLAVES],
  output ahb_resp_t resp
);

  logic [SW-1:0] sel_dp;

  always_ff @(posedge clk) begin
    if (!rst_n)           sel_dp <= '0;
    else if (resp.hready) sel_dp <= sel;
  end

  always_comb begin
    resp = s_resp[0];
    for (int i = 0; i < N_SLAVES; i++)
      if (sel_dp == SW'(i)) resp = s_resp[i];
  end

endmodule
