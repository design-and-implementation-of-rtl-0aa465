// ahb_master: AHB bus master driven by a simple user command port.
//
// The master runs one transfer at a time: a single beat or a 4-, 8- or
// 16-beat incrementing burst, read or write. Its control is the 8-state FSM
// of the design (state numbers 0..7 as exported on `state`):
//   IDLE(0)        waits for u_req; latches address, direction and burst kind.
//   REQ(1)         raises HBUSREQ.
//   GRANT(2)       keeps HBUSREQ up until HGRANT=1 and HREADY=1 (the previous
//                  transfer on the bus is finished; this is the "Wdone"
//                  condition of the state diagram), then goes to WRITE or
//                  READ according to the latched direction.
//   WRITE(3)/READ(6)             NONSEQ address phase of the first beat.
//   TRANS_WRITE(4)/TRANS_READ(7) SEQ address phase of the next beat and, at
//                  the same time, the data phase of the previous one.
//   TRANS_END(5)   data phase of the last beat; back to IDLE when HREADY=1.
// beat_counter holds the number of beats still to be addressed after the one
// on the bus; an address phase that completes with beat_counter = 0 leads to
// TRANS_END. Every state that has an address or data phase advances only on
// HREADY=1, so slave wait states stall the FSM.
//
// User side: hold u_wdata at the value of the current write beat; u_wnext
// pulses for one cycle when that beat has been taken, and the next value must
// then be presented. Read beats come out on u_rdata with a one-cycle
// u_rvalid. u_done pulses when the transfer ends; u_err is set if any beat of
// the transfer got a response other than OKAY (the burst still runs to its
// end) and stays set until the next command is taken.
//
// Own choices (the state diagram gives the states and transition conditions):
// reset is synchronous and active low; HBUSREQ is held from REQ up to the
// last address phase, which the arbiter uses to keep the bus for the whole
// burst; HSIZE is fixed at 2 (32-bit
// word), the value on the reference waveforms; beats are ADDR_INCR apart.
module ahb_master
  import ahb_pkg::*;
#(
  parameter int unsigned INCR = ADDR_INCR
) (
  input  logic              clk,
  input  logic              rst_n,
  // user command port
  input  logic              u_req,
  input  logic              u_write,
  input  logic [ADDR_W-1:0] u_addr,
  input  hburst_t           u_burst,
  input  logic [DATA_W-1:0] u_wdata,
  output logic              u_wnext,
  output logic [DATA_W-1:0] u_rdata,
  output logic              u_rvalid,
  output logic              u_done,
  output logic              u_err,
  output logic              u_busy,
  output mst_state_t        state,
  // AHB
  output logic              hbusreq,
  input  logic              hgrant,
  input  logic              hready,
  input  hresp_t            hresp,
  input  logic [DATA_W-1:0] hrdata,
  output ahb_ctrl_t         ctrl,
  output logic [DATA_W-1:0] hwdata
);

  mst_state_t        state_q, state_d;
  logic [ADDR_W-1:0] addr_q, addr_d;
  logic              write_q;
  hburst_t           burst_q;
  logic [4:0]        beat_counter_q, beat_counter_d;
  logic              err_q;

  logic addr_phase;   // this master drives an active transfer
  logic data_phase;   // one of this master's beats is in its data phase
  logic beat_done;    // that data phase completes this cycle

  assign addr_phase = (state_q == ST_WRITE) || (state_q == ST_READ) ||
                      (state_q == ST_TRANS_WRITE) || (state_q == ST_TRANS_READ);
  assign data_phase = (state_q == ST_TRANS_WRITE) || (state_q == ST_TRANS_READ) ||
                      (state_q == ST_TRANS_END);
  assign beat_done  = data_phase && hready;

  always_comb begin
    state_d        = state_q;
    addr_d         = addr_q;
    beat_counter_d = beat_counter_q;
    unique case (state_q)
      ST_IDLE:  if (u_req) state_d = ST_REQ;
      ST_REQ:   state_d = ST_GRANT;
      ST_GRANT: if (hgrant && hready) begin
        state_d        = write_q ? ST_WRITE : ST_READ;
        beat_counter_d = burst_beats(burst_q) - 5'd1;
      end
      ST_WRITE, ST_READ, ST_TRANS_WRITE, ST_TRANS_READ: if (hready) begin
        if (beat_counter_q == '0) begin
          state_d = ST_TRANS_END;
        end else begin
          state_d        = write_q ? ST_TRANS_WRITE : ST_TRANS_READ;
          beat_counter_d = beat_counter_q - 5'd1;
          addr_d         = addr_q + ADDR_W'(INCR);
        end
      end
      ST_TRANS_END: if (hready) state_d = ST_IDLE;
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q        <= ST_IDLE;
      addr_q         <= '0;
      write_q        <= 1'b0;
      burst_q        <= HBURST_SINGLE;
      beat_counter_q <= '0;
      err_q          <= 1'b0;
    end else begin
      state_q        <= state_d;
      addr_q         <= addr_d;
      beat_counter_q <= beat_counter_d;
      if (state_q == ST_IDLE && u_req) begin
        addr_q  <= u_addr;
        write_q <= u_write;
        burst_q <= u_burst;
        err_q   <= 1'b0;
      end else if (beat_done && hresp != HRESP_OKAY) begin
        err_q <= 1'b1;
      end
    end
  end

  // AHB outputs
  assign hbusreq     = (state_q == ST_REQ) || (state_q == ST_GRANT) || addr_phase;
  assign ctrl.haddr  = addr_phase ? addr_q : '0;
  assign ctrl.htrans = ((state_q == ST_WRITE) || (state_q == ST_READ)) ? HTRANS_NONSEQ :
                       addr_phase ? HTRANS_SEQ : HTRANS_IDLE;
  assign ctrl.hwrite = addr_phase && write_q;
  assign ctrl.hsize  = addr_phase ? 3'd2 : 3'd0;
  assign ctrl.hburst = addr_phase ? burst_q : HBURST_SINGLE;
  assign hwdata      = (data_phase && write_q) ? u_wdata : '0;

  // user outputs
  assign state    = state_q;
  assign u_wnext  = beat_done && write_q;
  assign u_rvalid = beat_done && !write_q;
  assign u_rdata  = hrdata;
  assign u_done   = (state_q == ST_TRANS_END) && hready;
  assign u_err    = err_q;
  assign u_busy   = (state_q != ST_IDLE);

  // An address phase held by HREADY=0 must keep its address and control.
  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (addr_phase && !hready) |=> $stable(ctrl))
    else $error("address/control changed during a wait state");

endmodule
