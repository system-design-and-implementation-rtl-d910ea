// axi_wdata_table: write data routing table.
//
// AXI write data carries only the master's WID, not an address, so the
// interconnect must remember where each write goes. The table has one entry per
// master and per master-side ID (N_M x N_ID entries of a slave index, the size
// the document's cost formula gives). The write address channel fills the
// entry when it forwards a request (set_*); the write data channel reads the
// entry of every held beat to route it and clears the entry with the burst's
// last beat (clr_*). A write address whose entry is still in use must wait,
// which the caller checks through vld. The valid bit per entry is this
// design's addition.
module axi_wdata_table #(
  parameter int unsigned N_M  = 5,
  parameter int unsigned N_ID = 8,
  parameter int unsigned SW   = 4,
  parameter int unsigned MW   = (N_M > 1) ? $clog2(N_M) : 1,
  parameter int unsigned IDW  = (N_ID > 1) ? $clog2(N_ID) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           set_valid,
  input  logic [MW-1:0]                  set_m,
  input  logic [IDW-1:0]                 set_id,
  input  logic [SW-1:0]                  set_dst,
  input  logic                           clr_valid,
  input  logic [MW-1:0]                  clr_m,
  input  logic [IDW-1:0]                 clr_id,
  output logic [N_M-1:0][N_ID-1:0]       vld,
  output logic [N_M-1:0][N_ID-1:0][SW-1:0] dst
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else begin
      if (clr_valid) vld[clr_m][clr_id] <= 1'b0;
      if (set_valid) vld[set_m][set_id] <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (set_valid) dst[set_m][set_id] <= set_dst;

  a_no_reuse: assert property (@(posedge clk) disable iff (!rst_n)
                               set_valid |-> !vld[set_m][set_id] || (clr_valid && clr_m == set_m && clr_id == set_id));
endmodule
