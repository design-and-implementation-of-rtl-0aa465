// ahb_arbiter: fixed-priority bus arbiter.
//
// Master 1 (hbusreq[0]) has the highest priority, then master 2, then
// master 3, as the design prescribes. The grant is re-evaluated on clock
// edges where HREADY=1. A master that holds the bus keeps it as long as it
// keeps HBUSREQ high, so a burst is never broken by a higher-priority
// request; once it drops HBUSREQ the highest-priority requester gets the
// grant. With no request no master is granted.
//
// hmaster is the number (1..N) of the master that owns the address phase, 0
// for none; it follows the grant by one HREADY cycle, because a master starts
// driving the bus on the edge where it sees HGRANT=1 and HREADY=1.
// hgrant is one-hot or zero. Reset (synchronous, active low) grants nobody.
// Keeping the bus for the length of HBUSREQ and the 0 = none encoding are
// this implementation's choices; the master numbering follows the reference
// waveforms (HMASTER = 1 for master 1, 2 for master 2).
module ahb_arbiter #(
  parameter int unsigned N_MASTERS = 3,
  localparam int unsigned MW       = $clog2(N_MASTERS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_MASTERS-1:0] hbusreq,
  input  logic                 hready,
  output logic [N_MASTERS-1:0] hgrant,
  output logic [MW-1:0]        hmaster
);

  logic [MW-1:0] gnt_q, gnt_d, hmaster_q;
  logic          owner_req;

  // priority pick: lowest index wins
  always_comb begin
    owner_req = 1'b0;
    for (int i = 0; i < N_MASTERS; i++)
      if (gnt_q == MW'(i + 1) && hbusreq[i]) owner_req = 1'b1;
    gnt_d = '0;
    if (owner_req) begin
      gnt_d = gnt_q;
    end else begin
      for (int i = N_MASTERS - 1; i >= 0; i--)
        if (hbusreq[i]) gnt_d = MW'(i + 1);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gnt_q     <= '0;
      hmaster_q <= '0;
    end else if (hready) begin
      gnt_q     <= gnt_d;
      hmaster_q <= gnt_q;
    end
  end

  always_comb
    for (int i = 0; i < N_MASTERS; i++) hgrant[i] = (gnt_q == MW'(i + 1));

  assign hmaster = hmaster_q;

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hgrant))
    else $error("more than one master granted");

endmodule
