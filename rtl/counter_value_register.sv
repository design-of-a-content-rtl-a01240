// counter_value_register: 6-bit register that captures the node counter at the
// end of each successful search phase, i.e. the number of nodes the search
// visited. The host reads it to plan the execution phase. A search that ends
// without success does not load it. A valid bit tells the host that the value
// belongs to a completed search; it is cleared when a new search starts.
// Loaded on the rising edge when load is high (load wins over invalidate);
// asynchronous active-low reset to 0. The valid bit is this design's addition.
module counter_value_register (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       invalidate,
  input  logic [5:0] d,
  output logic [5:0] q,
  output logic       valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else if (load) begin
      q     <= d;
      valid <= 1'b1;
    end else if (invalidate) begin
      valid <= 1'b0;
    end
  end
endmodule
