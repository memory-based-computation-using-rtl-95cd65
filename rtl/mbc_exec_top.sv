// mbc_exec_top: integer execution cluster with activity transfer to memory.
//
// The cluster has NUM_ALU integer adders and NUM_MUL integer multipliers. A
// bypass controller watches a fault flag and a temperature per unit; a unit
// that is defective, or hotter than 100 C, is bypassed. An operation issued to
// a bypassed unit is redirected to the memory-based unit, which computes it by
// looking up addition results in a two-level cache of result tables
// (multiplication by repeated memory-based addition). The first bypass makes
// the controller ask the operating system for the page of result tables; the
// page base it returns forms the physical addresses of table lines fetched
// from main memory. Until then operations for bypassed units wait.
//
// Interfaces (all plain signals)
//   issue   : iss_valid/iss_ready, iss_fu = the unit the scheduler chose
//             (0..NUM_ALU-1 adders, then multipliers), operands, result tag.
//             The operation is implied by the unit type. An operation for a
//             unit in service is always accepted.
//   results : one port per unit (fu_res_*) and one for the memory-based unit
//             (mbc_res_*), each valid for one cycle.
//   sensors : fault[NUM_FU], temp[NUM_FU] (degrees C).
//   OS      : os_req held until os_ack, which carries os_pagebase.
//   memory  : line fetch, see mbc_lookup.
//   status  : bypass vector, and event pulses for counting.
// Timing: adder units 1 cycle, multiplier units ALU_LAT/MUL_LAT, pipelined;
// the memory-based unit takes one operation at a time (9 cycles for an
// addition that hits in L1). The unit counts, the thresholds, the cache
// geometry and latencies follow the evaluated configuration; the port
// structure, the single issue port and the functional-unit latencies are this
// design's.
module mbc_exec_top
  import mbc_pkg::*;
#(
  parameter int unsigned NUM_ALU = 6,
  parameter int unsigned NUM_MUL = 2,
  parameter int unsigned ALU_LAT = 1,
  parameter int unsigned MUL_LAT = 3,
  parameter int unsigned TAG_W   = 8,
  parameter int unsigned T_HOT   = 100,
  parameter int unsigned T_COOL  = 95,
  parameter int unsigned L1_WAYS = 2,
  parameter int unsigned L1_SETS = 16,
  parameter int unsigned L2_WAYS = 4,
  parameter int unsigned L2_SETS = 64,
  parameter int unsigned L2_LAT  = 6,
  localparam int unsigned NUM_FU = NUM_ALU + NUM_MUL,
  localparam int unsigned FU_W   = $clog2(NUM_FU)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // issue
  input  logic                  iss_valid,
  output logic                  iss_ready,
  input  logic [FU_W-1:0]       iss_fu,
  input  logic [31:0]           iss_a,
  input  logic [31:0]           iss_b,
  input  logic [TAG_W-1:0]      iss_tag,
  // results of the functional units
  output logic [NUM_FU-1:0]     fu_res_valid,
  output logic [TAG_W-1:0]      fu_res_tag   [NUM_FU],
  output logic [31:0]           fu_res_value [NUM_FU],
  // result of the memory-based unit
  output logic                  mbc_res_valid,
  output logic [TAG_W-1:0]      mbc_res_tag,
  output logic [31:0]           mbc_res_value,
  // sensors
  input  logic [NUM_FU-1:0]     fault,
  input  logic [7:0]            temp [NUM_FU],
  // operating system
  output logic                  os_req,
  input  logic                  os_ack,
  input  logic [PAGEBASE_W-1:0] os_pagebase,
  // main memory
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic [PA_W-1:0]       mem_req_addr,
  input  logic                  mem_rdata_valid,
  input  chunk_t                mem_rdata,
  // status
  output logic [NUM_FU-1:0]     bypass,
  output logic [NUM_FU-1:0]     thermal_trip,
  output logic [NUM_FU-1:0]     thermal_release,
  output mbc_events_t           events,
  output logic                  mbc_swapped,
  output logic                  mbc_mul_add
);

  logic [PAGEBASE_W-1:0] pagebase;
  logic                  pagebase_valid;
  logic [NUM_FU-1:0]     hot;

  bypass_ctrl #(.NUM_FU(NUM_FU), .T_HOT(T_HOT), .T_COOL(T_COOL)) u_bypass (
    .clk, .rst_n, .fault, .temp, .bypass, .hot, .trip(thermal_trip), .release_(thermal_release),
    .os_req, .os_ack, .os_pagebase, .pagebase, .pagebase_valid
  );

  logic    to_mbc, mbc_in_ready;
  mbc_op_e op;
  assign to_mbc    = bypass[iss_fu];
  assign op        = (iss_fu < FU_W'(NUM_ALU)) ? OP_ADD : OP_MUL;
  assign iss_ready = to_mbc ? mbc_in_ready : 1'b1;

  for (genvar i = 0; i < NUM_FU; i++) begin : g_fu
    int_fu #(.IS_MUL(i >= NUM_ALU), .LAT(i >= NUM_ALU ? MUL_LAT : ALU_LAT), .TAG_W(TAG_W)) u_fu (
      .clk, .rst_n,
      .in_valid(iss_valid && !to_mbc && iss_fu == FU_W'(i)),
      .a(iss_a), .b(iss_b), .tag(iss_tag),
      .out_valid(fu_res_valid[i]), .out_tag(fu_res_tag[i]), .out_result(fu_res_value[i])
    );
  end

  mbc_unit #(
    .TAG_W(TAG_W), .L1_WAYS(L1_WAYS), .L1_SETS(L1_SETS),
    .L2_WAYS(L2_WAYS), .L2_SETS(L2_SETS), .L2_LAT(L2_LAT)
  ) u_mbc (
    .clk, .rst_n, .pagebase, .pagebase_valid,
    .in_valid(iss_valid && to_mbc), .in_ready(mbc_in_ready),
    .op, .a(iss_a), .b(iss_b), .tag(iss_tag),
    .out_valid(mbc_res_valid), .out_tag(mbc_res_tag), .out_result(mbc_res_value),
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rdata_valid, .mem_rdata,
    .events, .swapped(mbc_swapped), .mul_add(mbc_mul_add)
  );

  logic unused_ok;
  assign unused_ok = ^hot;

  a_fu_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    iss_valid |-> int'(iss_fu) < int'(NUM_FU));

endmodule
