// ocp_if: byte-wide OCP (Open Core Protocol) bundle between the JTAG
// controller (master) and tcReg (slave) over a 64 KB address space.
// A command is a one-cycle MCmd pulse (WR or RD); the slave accepts at once and
// answers with SResp = DVA in a later cycle, carrying SRespData for reads. Only one
// transfer is outstanding. The 16-bit address and 8-bit data follow the
// document's "byte wide access to a 64 KB address space"; the single
// outstanding transfer and response-for-writes are this design's choice.
interface ocp_if (input logic clk, input logic rst_n);
  import tc_pkg::*;
  ocp_cmd_e    MCmd;
  logic [15:0] MAddr;
  logic [7:0]  MData;
  logic        SCmdAccept;
  ocp_resp_e   SResp;
  logic [7:0]  SRespData;

  modport master (input clk, rst_n, SCmdAccept, SResp, SRespData, output MCmd, MAddr, MData);
  modport slave  (input clk, rst_n, MCmd, MAddr, MData, output SCmdAccept, SResp, SRespData);

  // A response never arrives without an outstanding command.
  logic outstanding;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) outstanding <= 1'b0;
    else if (MCmd != OCP_IDLE && SCmdAccept) outstanding <= 1'b1;
    else if (SResp == OCP_DVA) outstanding <= 1'b0;

  a_resp_after_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    SResp == OCP_DVA |-> outstanding);
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    (outstanding && SResp != OCP_DVA) |-> MCmd == OCP_IDLE);
endinterface
