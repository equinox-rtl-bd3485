// eqx_completion_unit: gathers instruction completions from the datapath.
//
// Each execution unit (0 MMU, 1 SIMD, 2 DRAM interface, 3 host interface)
// reports a finished command with a one-cycle pulse and its instruction ID
// into a completion queue of its own (depth 2). One completion per cycle is
// taken from the queues, round-robin, and passed to the instruction
// controller (cpl_valid / cpl_tag); immediate completions from the decoder
// (nop_*) take precedence. `completed` counts all completions.
// Role and per-unit queues follow the design description; queue depth and
// the round-robin order are this design's choices.
module eqx_completion_unit
  import eqx_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      unit_done,
  input  tag_t [3:0]      unit_tag,
  input  logic            nop_valid,
  input  tag_t            nop_tag,
  output logic            cpl_valid,
  output tag_t            cpl_tag,
  output logic [31:0]     completed
);
  logic [3:0] q_valid, q_pop;
  tag_t [3:0] q_tag;
  logic [1:0] rr, sel;
  logic       found;

  for (genvar u = 0; u < 4; u++) begin : g_q
    logic in_ready;
    eqx_fifo #(.DW($bits(tag_t)), .DEPTH(2)) u_q (
      .clk, .rst_n, .in_valid(unit_done[u]), .in_ready(in_ready), .in_data(unit_tag[u]),
      .out_valid(q_valid[u]), .out_ready(q_pop[u]), .out_data(q_tag[u]), .count());
    assert property (@(posedge clk) disable iff (!rst_n) unit_done[u] |-> in_ready);
  end

  always_comb begin
    found = 1'b0;
    sel   = rr;
    for (int k = 0; k < 4; k++) begin
      if (!found && q_valid[2'(rr + 2'(k))]) begin
        found = 1'b1;
        sel   = 2'(rr + 2'(k));
      end
    end
    q_pop = '0;
    if (!nop_valid && found) q_pop[sel] = 1'b1;
    cpl_valid = nop_valid || found;
    cpl_tag   = nop_valid ? nop_tag : q_tag[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr        <= '0;
      completed <= '0;
    end else begin
      if (q_pop != '0) rr <= sel + 2'd1;
      if (cpl_valid)   completed <= completed + 1'b1;
    end
  end
endmodule
