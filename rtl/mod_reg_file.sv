// mod_reg_file: NUM_REGS registers of WIDTH bits, all readable at once.
//
// A write decoder (two_to_four_decoder) enables one register when wr is 1;
// each flip-flop has a two_to_one_mux in front of it that either recirculates
// its value or takes ld_data, so the selected register loads ld_data on the
// rising clk edge and all others hold. Every register is driven out on its
// own bus data[k], with no read address. as_reset (active high, asynchronous)
// clears every bit to 0, which the lock displays as digit 1, so a cleared
// code reads 1111. The structure follows the original; the decoder fixes the
// size at four registers, so NUM_REGS may only be lowered.
module mod_reg_file #(
  parameter int unsigned NUM_REGS = 4,
  parameter int unsigned WIDTH    = 2
) (
  input  logic                          clk,
  input  logic                          as_reset,
  input  logic [WIDTH-1:0]              ld_data,
  input  logic                          wa0,
  input  logic                          wa1,
  input  logic                          wr,
  output logic [NUM_REGS-1:0][WIDTH-1:0] data
);
  logic [3:0] load;

  two_to_four_decoder u_dec (.w0(wa0), .w1(wa1), .en(wr), .y(load));

  for (genvar r = 0; r < NUM_REGS; r++) begin : g_reg
    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      logic d;
      two_to_one_mux u_mux (.s(load[r]), .x0(data[r][b]), .x1(ld_data[b]), .z(d));
      always_ff @(posedge clk or posedge as_reset) begin
        if (as_reset) data[r][b] <= 1'b0;
        else          data[r][b] <= d;
      end
    end
  end

  initial assert (NUM_REGS <= 4) else $error("mod_reg_file: at most four registers");
endmodule
