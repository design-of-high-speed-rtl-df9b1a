// shift_add_mult: sequential add-and-shift multiplier for unsigned operands.
//
// How it works. Registers C (carry), A (accumulator), Q (multiplier) and M
// (multiplicand). Each clock the control looks at Q[0]: if it is 1, M is
// added to A with the carry out going to C; if it is 0 nothing is added.
// Then {C, A, Q} is shifted right by one place (a logical shift, C becomes
// 0). After WIDTH steps the 2*WIDTH-bit product is {A, Q}. The add and the
// shift happen in the same clock, so C is only the adder's carry out and is
// not kept in a register of its own.
//
// Interface and timing are those of booth_radix2_mult: 'start' is accepted
// while busy is low, WIDTH steps follow, 'done' pulses on the last one and
// 'product' stays valid until the next start. Reset is asynchronous, active
// low.
//
// From the document: the C, A and Q registers, adding the multiplicand when
// Q0 is 1, shifting C, A and Q right each step, the product left in A and Q.
// This design's choices: the width default, the merged add-and-shift clock
// and the handshake.
module shift_add_mult
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic                 busy,
  output logic                 done,
  output logic [2*WIDTH-1:0]   product
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  seq_state_t       state;
  logic [WIDTH-1:0] acc;    // A
  logic [WIDTH-1:0] mcand;  // M
  logic [WIDTH-1:0] q;      // Q
  logic [CW-1:0]    cnt;

  logic [WIDTH:0]   cacc;   // {C, A} after the conditional add

  always_comb cacc = q[0] ? ({1'b0, acc} + {1'b0, mcand}) : {1'b0, acc};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEQ_IDLE;
      acc   <= '0;
      mcand <= '0;
      q     <= '0;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        SEQ_IDLE, SEQ_DONE: begin
          if (start) begin
            acc   <= '0;
            mcand <= a;
            q     <= b;
            cnt   <= CW'(WIDTH);
            state <= SEQ_RUN;
          end
        end
        SEQ_RUN: begin
          acc <= cacc[WIDTH:1];
          q   <= {cacc[0], q[WIDTH-1:1]};
          cnt <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            state <= SEQ_DONE;
            done  <= 1'b1;
          end
        end
        default: state <= SEQ_IDLE;
      endcase
    end
  end

  assign busy    = (state == SEQ_RUN);
  assign product = {acc, q};

endmodule
