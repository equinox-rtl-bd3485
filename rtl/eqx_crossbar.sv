// eqx_crossbar: 2 x 2 switch between the two off-datapath initiators (DRAM
// interface, host interface) and the read-write ports of the activation and
// weight buffers.
//
// Each initiator presents a request (valid, write enable, target buffer,
// weight bank, word address, write data) and gets `ready` when the request is
// forwarded in that cycle. Requests to different buffers pass in the same
// cycle; when both initiators want the same buffer, the DRAM interface wins
// and the host request waits with ready low. Read data return to the
// initiator one cycle after its request was accepted, with `rvalid`.
// The switch position follows the design's block diagram; the arbitration is
// this design's choice.
module eqx_crossbar
  import eqx_pkg::*;
#(
  parameter int WORD = 4588,
  parameter int AW_A = 16,      // activation address bits
  parameter int AW_W = 15,      // weight address bits
  parameter int BKW  = 2        // weight bank bits
) (
  input  logic            clk,
  input  logic            rst_n,
  // initiator 0: DRAM interface, initiator 1: host interface
  input  logic [1:0]      i_valid,
  output logic [1:0]      i_ready,
  input  logic [1:0]      i_we,
  input  logic [1:0]      i_weight,
  input  logic [1:0][BKW-1:0]  i_bank,
  input  logic [1:0][19:0]     i_addr,
  input  logic [1:0][WORD-1:0] i_wdata,
  output logic [1:0]           i_rvalid,
  output logic [1:0][WORD-1:0] i_rdata,
  // activation buffer read-write port
  output logic            act_en,
  output logic            act_we,
  output logic [AW_A-1:0] act_addr,
  output logic [WORD-1:0] act_wdata,
  input  logic [WORD-1:0] act_rdata,
  // weight buffer read-write port
  output logic            wgt_en,
  output logic            wgt_we,
  output logic [BKW-1:0]  wgt_bank,
  output logic [AW_W-1:0] wgt_addr,
  output logic [WORD-1:0] wgt_wdata,
  input  logic [WORD-1:0] wgt_rdata
);
  logic act_sel, wgt_sel;          // initiator granted each target
  logic [1:0] rd_pend_q;           // read accepted last cycle, per initiator
  logic [1:0] rd_tgt_q;            // 1: it read the weight buffer

  always_comb begin
    // DRAM (0) first, host (1) second
    act_sel = !(i_valid[0] && !i_weight[0]);
    wgt_sel = !(i_valid[0] &&  i_weight[0]);
    act_en  = (i_valid[0] && !i_weight[0]) || (i_valid[1] && !i_weight[1]);
    wgt_en  = (i_valid[0] &&  i_weight[0]) || (i_valid[1] &&  i_weight[1]);
    act_we    = i_we[act_sel];
    act_addr  = AW_A'(i_addr[act_sel]);
    act_wdata = i_wdata[act_sel];
    wgt_we    = i_we[wgt_sel];
    wgt_bank  = i_bank[wgt_sel];
    wgt_addr  = AW_W'(i_addr[wgt_sel]);
    wgt_wdata = i_wdata[wgt_sel];
    i_ready[0] = 1'b1;
    i_ready[1] = i_weight[1] ? (wgt_sel == 1'b1) : (act_sel == 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend_q <= '0;
      rd_tgt_q  <= '0;
    end else begin
      for (int k = 0; k < 2; k++) begin
        rd_pend_q[k] <= i_valid[k] && i_ready[k] && !i_we[k];
        rd_tgt_q[k]  <= i_weight[k];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      i_rvalid[k] = rd_pend_q[k];
      i_rdata[k]  = rd_tgt_q[k] ? wgt_rdata : act_rdata;
    end
  end
endmodule
