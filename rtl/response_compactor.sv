// Accumulator-based response compactor.
//
// Each rising clock edge with en high adds the CUT response, zero-extended,
// to the signature register, modulo 2^SIG_W. After the test the signature is
// compared with that of the fault-free circuit. rst clears it synchronously.
// The register width is this design's choice.
module response_compactor #(
  parameter int RESP_W = 2,
  parameter int SIG_W  = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [RESP_W-1:0] resp,
  output logic [SIG_W-1:0]  signature
);

  always_ff @(posedge clk) begin
    if (rst)     signature <= '0;
    else if (en) signature <= signature + SIG_W'(resp);
  end

  initial assert (SIG_W >= RESP_W) else $error("response_compactor: SIG_W < RESP_W");

endmodule
