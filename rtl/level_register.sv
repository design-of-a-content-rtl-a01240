// level_register: 4-bit register holding the highest level number of the
// dataflow graph held in the associative memory. The host loads it before a
// search phase; the control unit compares the current level against it to know
// when all levels have been searched (and starts the execution phase there).
// Loaded on the rising edge when load is high; asynchronous active-low reset
// to 0. The loading path (from the input/output side) follows the block
// diagram; reset value and load timing are this design's choice.
module level_register (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [3:0] d,
  output logic [3:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
