// ahb_wdata_mux: write data multiplexer.
//
// Write data belongs to the data phase, one HREADY cycle after its address
// phase, so the mux keeps its own copy of HMASTER delayed by one HREADY
// cycle (hmaster_dp) and uses it to pick that master's HWDATA. With no
// data-phase owner (0) the bus carries zero. Reset (synchronous, active low)
// clears the delayed owner. The mux belongs to the design; the delayed
// selection is this implementation's choice, following AHB data-phase timing.
module ahb_wdata_mux
  import ahb_pkg::*;
#(
  parameter int unsigned N_MASTERS = 3,
  localparam int unsigned MW       = $clog2(N_MASTERS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hready,
  input  logic [MW-1:0]     hmaster,
  input  logic [DATA_W-1:0] m_hwdata [N_MASTERS],
  output logic [DATA_W-1:0] hwdata,
  output logic [MW-1:0]     hmaster_dp
);

  always_ff @(posedge clk) begin
    if (!rst_n)      hmaster_dp <= '0;
    else if (hready) hmaster_dp <= hmaster;
  end

  always_comb begin
    hwdata = '0;
    for (int i = 0; i < N_MASTERS; i++)
      if (hmaster_dp == MW'(i + 1)) hwdata = m_hwdata[i];
  end

endmodule
