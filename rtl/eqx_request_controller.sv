// eqx_request_controller: chooses which request queue feeds the instruction
// dispatcher.
//
// It sees whether an inference batch is formed and whether a training batch
// is queued ("requests available"), and whether each hardware context can
// take a new batch. An inference batch goes first when its context is free;
// otherwise a training batch goes when the training context is free. `sel`
// drives the queue-selection multiplexer (0 inference, 1 training) and `go`
// is high for the cycle the batch is handed over. Purely combinational.
// Its place and role follow the design description; the selection rule is
// this design's choice.
module eqx_request_controller (
  input  logic       inf_avail,
  input  logic       trn_avail,
  input  logic [1:0] ctx_free,
  output logic       sel,
  output logic       go
);
  always_comb begin
    if (inf_avail && ctx_free[0]) begin
      sel = 1'b0;
      go  = 1'b1;
    end else if (trn_avail && ctx_free[1]) begin
      sel = 1'b1;
      go  = 1'b1;
    end else begin
      sel = 1'b0;
      go  = 1'b0;
    end
  end
endmodule
