// step_reg - control register written by the processor of the link.
//
// Holds the DDS Step shared by transmitter and receiver and the run bit
// that takes the transmit/receive pipelines out of their idle state.
// Register map (this design's choice):
//   addr 0: step  (bits AW-1:0)
//   addr 1: run   (bit 0)
// A write takes effect at the next clock edge; rdata returns the addressed
// register combinationally. Synchronous reset clears both registers.
module step_reg #(
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic          addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,
  output logic [AW-1:0] step,
  output logic          run
);
  always_ff @(posedge clk) begin
    if (rst) begin
      step <= '0;
      run  <= 1'b0;
    end else if (we) begin
      if (addr == 1'b0) step <= wdata[AW-1:0];
      else              run  <= wdata[0];
    end
  end

  assign rdata = (addr == 1'b0) ? 32'(step) : {31'b0, run};
endmodule
