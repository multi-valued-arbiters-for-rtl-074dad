// response_reg: the response register REG.
//
// Collects the responses of all PUF instances into one word at the end of a
// measurement, so that the serial link can send a stable copy while the next
// measurement runs. load copies d into q on the rising clock edge and raises
// valid for the following cycle. rst_n (asynchronous, active low) clears both.
// The register follows the published design; the valid flag is this design's addition.
module response_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) q <= d;
    end
  end
endmodule
