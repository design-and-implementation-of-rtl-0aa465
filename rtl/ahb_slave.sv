// ahb_slave: AHB slave holding a word-wide memory.
//
// A transfer is accepted in its address phase when HSEL=1, HREADY=1 and
// HTRANS is NONSEQ or SEQ; address, direction and the memory index are then
// registered for the data phase. In the data phase a write stores HWDATA at
// the registered index when the phase completes, and a read drives the stored
// word on HRDATA. Each word of the memory sits at one address value: the
// index is the low $clog2(MEM_DEPTH) address bits, so the 2-unit steps of a
// burst use every second word.
//
// Timing: with WAIT_STATES = 0 every data phase takes one cycle (HREADYOUT
// stays 1, as in the reference design). A non-zero WAIT_STATES holds
// HREADYOUT low for that many cycles at the start of every data phase. The
// response is always OKAY. IDLE and BUSY transfers get a zero-wait OKAY.
//
// The memory function follows the design; its depth (256 words), the
// wait-state option, the index mapping and the synchronous active-low reset
// are this implementation's choices. The memory itself is not reset.
module ahb_slave
  import ahb_pkg::*;
#(
  parameter int unsigned MEM_DEPTH   = 256,
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hsel,
  input  ahb_ctrl_t         ctrl,
  input  logic              hready,
  input  logic [DATA_W-1:0] hwdata,
  output ahb_resp_t         resp
);

  localparam int unsigned IDX_W = $clog2(MEM_DEPTH);
  localparam int unsigned WCW   = (WAIT_STATES > 0) ? $clog2(WAIT_STATES + 1) : 1;

  logic [DATA_W-1:0] mem [MEM_DEPTH];

  logic             dp_valid_q, dp_write_q;
  logic [IDX_W-1:0] dp_idx_q;
  logic [WCW-1:0]   wait_q;
  logic             accept, hreadyout;

  assign accept    = hsel && hready &&
                     (ctrl.htrans == HTRANS_NONSEQ || ctrl.htrans == HTRANS_SEQ);
  assign hreadyout = !(dp_valid_q && wait_q != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dp_valid_q <= 1'b0;
      dp_write_q <= 1'b0;
      dp_idx_q   <= '0;
      wait_q     <= '0;
    end else begin
      if (dp_valid_q && wait_q != '0) wait_q <= wait_q - 1'b1;
      if (hready) begin
        dp_valid_q <= accept;
        if (accept) begin
          dp_write_q <= ctrl.hwrite;
          dp_idx_q   <= ctrl.haddr[IDX_W-1:0];
          wait_q     <= WCW'(WAIT_STATES);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (dp_valid_q && dp_write_q && hreadyout) mem[dp_idx_q] <= hwdata;
  end

  assign resp.hready = hreadyout;
  assign resp.hresp  = HRESP_OKAY;
  assign resp.hrdata = (dp_valid_q && !dp_write_q) ? mem[dp_idx_q] : '0;

endmodule
