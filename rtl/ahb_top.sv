// ahb_top: AHB system with three masters and four slaves joined by a central
// multiplexer interconnect.
//
// Structure: each master asks the fixed-priority arbiter for the bus with
// HBUSREQ; the arbiter answers with HGRANT and HMASTER. The address and
// control mux puts the owner's address phase on the shared bus; the decoder
// turns the address into one HSEL per slave; the write data mux forwards the
// data-phase owner's HWDATA to all slaves; the read data mux returns the
// data-phase slave's HRDATA, HREADY and HRESP to all masters. The bus is
// pipelined as in AMBA AHB: the address phase of one beat overlaps the data
// phase of the previous one, and HREADY=0 from a slave stalls the whole bus.
//
// Interface: every master has a command port (u_*, see ahb_master), indexed
// 0..2 for masters 1..3; the shared bus signals are brought out for
// observation. Timing: a k-beat burst on an idle bus takes REQ, GRANT, k
// address cycles and one TRANS_END cycle with zero-wait slaves, so it ends
// k+3 cycles after the command is taken (IDLE -> REQ).
//
// The blocks and their connection follow the architecture of the design; the
// address map (slave n at (n-1)*256 .. (n-1)*256+255) and SLAVE_WAIT, the
// wait states every slave inserts per beat (0 in the design), are this
// implementation's choices.
module ahb_top
  import ahb_pkg::*;
#(
  parameter int unsigned N_MASTERS  = 3,
  parameter int unsigned N_SLAVES   = 4,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter int unsigned SLAVE_WAIT = 0,
  localparam int unsigned MW        = $clog2(N_MASTERS + 1),
  localparam int unsigned SW        = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // master command ports
  input  logic              u_req   [N_MASTERS],
  input  logic              u_write [N_MASTERS],
  input  logic [ADDR_W-1:0] u_addr  [N_MASTERS],
  input  hburst_t           u_burst [N_MASTERS],
  input  logic [DATA_W-1:0] u_wdata [N_MASTERS],
  output logic              u_wnext [N_MASTERS],
  output logic [DATA_W-1:0] u_rdata [N_MASTERS],
  output logic              u_rvalid[N_MASTERS],
  output logic              u_done  [N_MASTERS],
  output logic              u_err   [N_MASTERS],
  output logic              u_busy  [N_MASTERS],
  output mst_state_t        m_state [N_MASTERS],
  // shared bus, for observation
  output logic [N_MASTERS-1:0] hbusreq,
  output logic [N_MASTERS-1:0] hgrant,
  output logic [MW-1:0]        hmaster,
  output ahb_ctrl_t            bus_ctrl,
  output logic [N_SLAVES-1:0]  hsel,
  output logic [DATA_W-1:0]    hwdata,
  output ahb_resp_t            bus_resp
);

  ahb_ctrl_t         m_ctrl   [N_MASTERS];
  logic [DATA_W-1:0] m_hwdata [N_MASTERS];
  ahb_resp_t         s_resp   [N_SLAVES];
  logic [SW-1:0]     sel;

  for (genvar m = 0; m < N_MASTERS; m++) begin : g_master
    ahb_master u_master (
      .clk, .rst_n,
      .u_req(u_req[m]), .u_write(u_write[m]), .u_addr(u_addr[m]),
      .u_burst(u_burst[m]), .u_wdata(u_wdata[m]), .u_wnext(u_wnext[m]),
      .u_rdata(u_rdata[m]), .u_rvalid(u_rvalid[m]), .u_done(u_done[m]),
      .u_err(u_err[m]), .u_busy(u_busy[m]), .state(m_state[m]),
      .hbusreq(hbusreq[m]), .hgrant(hgrant[m]),
      .hready(bus_resp.hready), .hresp(bus_resp.hresp), .hrdata(bus_resp.hrdata),
      .ctrl(m_ctrl[m]), .hwdata(m_hwdata[m])
    );
  end

  ahb_arbiter #(.N_MASTERS(N_MASTERS)) u_arbiter (
    .clk, .rst_n, .hbusreq, .hready(bus_resp.hready), .hgrant, .hmaster
  );

  ahb_addr_mux #(.N_MASTERS(N_MASTERS)) u_addr_mux (
    .hmaster, .m_ctrl, .ctrl(bus_ctrl)
  );

  ahb_decoder #(.N_SLAVES(N_SLAVES)) u_decoder (
    .haddr(bus_ctrl.haddr), .hsel, .sel
  );

  ahb_wdata_mux #(.N_MASTERS(N_MASTERS)) u_wdata_mux (
    .clk, .rst_n, .hready(bus_resp.hready), .hmaster, .m_hwdata, .hwdata, .hmaster_dp()
  );

  for (genvar s = 0; s < N_SLAVES; s++) begin : g_slave
    ahb_slave #(.MEM_DEPTH(MEM_DEPTH), .WAIT_STATES(SLAVE_WAIT)) u_slave (
      .clk, .rst_n, .hsel(hsel[s]), .ctrl(bus_ctrl), .hready(bus_resp.hready),
      .hwdata, .resp(s_resp[s])
    );
  end

  ahb_rdata_mux #(.N_SLAVES(N_SLAVES)) u_rdata_mux (
    .clk, .rst_n, .sel, .s_resp, .resp(bus_resp)
  );

endmodule
