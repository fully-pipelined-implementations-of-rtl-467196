// pipe_reg: optional pipeline register. With EN = 1 the data is registered on
// every rising clock edge (no enable, no reset: the pipeline never stalls and
// valid bits travel separately); with EN = 0 it is a plain wire. Used to put
// the pipeline cuts chosen by aes_pkg::cut_mask into the round logic. With
// EN = 0 the clock input is left unused, which lint reports for that case.
module pipe_reg #(
  parameter int unsigned W  = 8,
  parameter bit          EN = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (EN) begin : g_reg
    always_ff @(posedge clk) q <= d;
  end else begin : g_wire
    assign q = d;
  end
endmodule
