// bypass_ctrl: decides which functional units are bypassed and obtains the
// page of result tables from the operating system.
//
// A unit is bypassed while it is marked permanently defective (fault) or while
// it is hot. A unit becomes hot when its temperature exceeds T_HOT degrees C
// and stays hot until it has cooled below T_COOL, so that it does not toggle
// around the threshold. The first time any unit is bypassed the controller
// asks the operating system to load the result tables (os_req, held until
// os_ack); the page base returned with os_ack is kept in pagebase and
// pagebase_valid is set. The tables then stay loaded.
//
// Interfaces: fault and temp per unit (temp in whole degrees C, unsigned);
// bypass per unit, combinational from fault and registered hot state;
// os_req/os_ack/os_pagebase level handshake; trip/release pulse when a unit
// becomes hot or cool again.
// The 100 C threshold, the fault/thermal triggers and the OS request follow
// the described flow; the cool-down threshold and the handshake are this
// design's.
module bypass_ctrl
  import mbc_pkg::*;
#(
  parameter int unsigned NUM_FU = 8,
  parameter int unsigned T_HOT  = 100,
  parameter int unsigned T_COOL = 95
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_FU-1:0]     fault,
  input  logic [7:0]            temp [NUM_FU],
  output logic [NUM_FU-1:0]     bypass,
  output logic [NUM_FU-1:0]     hot,
  output logic [NUM_FU-1:0]     trip,
  output logic [NUM_FU-1:0]     release_,
  output logic                  os_req,
  input  logic                  os_ack,
  input  logic [PAGEBASE_W-1:0] os_pagebase,
  output logic [PAGEBASE_W-1:0] pagebase,
  output logic                  pagebase_valid
);

  logic [NUM_FU-1:0] hot_q;

  always_comb begin
    for (int i = 0; i < NUM_FU; i++) begin
      trip[i]     = !hot_q[i] && temp[i] > 8'(T_HOT);
      release_[i] =  hot_q[i] && temp[i] < 8'(T_COOL);
    end
  end

  assign hot    = hot_q;
  assign bypass = fault | hot_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hot_q          <= '0;
      os_req         <= 1'b0;
      pagebase       <= '0;
      pagebase_valid <= 1'b0;
    end else begin
      hot_q <= (hot_q | trip) & ~release_;
      if (os_req && os_ack) begin
        os_req         <= 1'b0;
        pagebase       <= os_pagebase;
        pagebase_valid <= 1'b1;
      end else if (!pagebase_valid && |bypass) begin
        os_req <= 1'b1;
      end
    end
  end

  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    os_req && !os_ack |=> os_req);

endmodule
