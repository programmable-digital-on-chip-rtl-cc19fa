// code_transmitter: serialises the pull-down and pull-up codes onto one line.
//
// Two N-bit parallel-to-series registers hold the pull-down and pull-up
// held codes (BCDA). Each captures its code at the start of its half of the
// UPDATE_CK period (load_d / load_u) and, on each of its CODE_CK rising
// edges (ck1d / ck1u), moves its next bit, MSB first, into an output flip-
// flop. A multiplexer selects the pull-down register while UPDATE_CK is high
// and the pull-up register while it is low; the result is the single long
// line that runs to every receiver. Two registers, the MUX and the rising-
// edge transmit follow the original design; MSB-first order and the load
// instant are this implementation's choices. Timing: a bit appears on line
// one clock after its ck1 enable and stays until the next one.
module code_transmitter #(
  parameter int unsigned N = odt_pkg::CODE_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] code_d,
  input  logic [N-1:0] code_u,
  input  logic         load_d,
  input  logic         load_u,
  input  logic         ck1d,
  input  logic         ck1u,
  input  logic         update_ck,
  output logic         line
);
  logic [N-1:0] sh_d, sh_u;
  logic         bit_d, bit_u;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_d  <= '0;
      bit_d <= 1'b0;
    end else if (load_d) begin
      sh_d <= code_d;
    end else if (ck1d) begin
      bit_d <= sh_d[N-1];
      sh_d  <= sh_d << 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_u  <= '0;
      bit_u <= 1'b0;
    end else if (load_u) begin
      sh_u <= code_u;
    end else if (ck1u) begin
      bit_u <= sh_u[N-1];
      sh_u  <= sh_u << 1;
    end
  end

  assign line = update_ck ? bit_d : bit_u;

  a_load_shift_d: assert property (@(posedge clk) disable iff (!rst_n) !(load_d && ck1d));
  a_load_shift_u: assert property (@(posedge clk) disable iff (!rst_n) !(load_u && ck1u));
endmodule
