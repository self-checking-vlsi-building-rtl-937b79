// pm_model: behavioural stand-in for one processor-plus-memory module of a
// self-checking node. Not a design of the module itself: it only gives the
// node testbench a deterministic synchronous machine with the interface the
// node expects (output word, reset, interrupt) and two ways to make it fail.
//
// Each clock the N-bit state is rotated left and mixed with the input word;
// while intr is high a fixed constant is mixed in as well, standing for the
// interrupt routine. A synchronous reset returns the state to zero, the sane
// state. flip XORs into the state for one cycle (a transient fault);
// stuck_en forces output bit stuck_bit to stuck_val (a permanent fault).
module pm_model #(
  parameter int unsigned N = 16
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 intr,
  input  logic [N-1:0]         din,
  input  logic [N-1:0]         flip,
  input  logic                 stuck_en,
  input  logic [$clog2(N)-1:0] stuck_bit,
  input  logic                 stuck_val,
  output logic [N-1:0]         dout
);

  logic [N-1:0] state;

  always_ff @(posedge clk) begin
    if (reset) state <= '0;
    else       state <= {state[N-2:0], state[N-1]} ^ din ^ (intr ? N'('h5A5A) : '0) ^ flip;
  end

  always_comb begin
    dout = state;
    if (stuck_en) dout[stuck_bit] = stuck_val;
  end

endmodule
