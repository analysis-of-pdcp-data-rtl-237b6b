// module_select: push-button selection of the module shown on the LCD.
//
// A counter from 0 to MAX_SEL (32 by default: modules 0..31, and 32 for the
// overall load). Pressing key_up adds one, wrapping from MAX_SEL to 0;
// pressing key_down subtracts one, wrapping from 0 to MAX_SEL. Each press
// moves the counter once however long the key is held: a flag is set on the
// first step and cleared only when both keys are released. Both keys held
// together do nothing and leave the flag as it is. The keys are taken
// active high here and pass through a two-flip-flop synchroniser first (the
// synchroniser is this design's addition; there is no debouncing). The
// selection changes two clocks after the key edge plus one.
module module_select #(
  parameter int unsigned MAX_SEL = 32
) (
  input  logic                       clk,
  input  logic                       rst,       // synchronous, active high
  input  logic                       key_up,    // pressed = 1
  input  logic                       key_down,  // pressed = 1
  output logic [$clog2(MAX_SEL+1)-1:0] sel
);

  localparam int unsigned SW = $clog2(MAX_SEL + 1);

  logic [1:0] keys_meta, keys;     // {up, down}
  logic       pressed;

  always_ff @(posedge clk) begin
    if (rst) begin
      keys_meta <= '0;
      keys      <= '0;
      pressed   <= 1'b0;
      sel       <= '0;
    end else begin
      keys_meta <= {key_up, key_down};
      keys      <= keys_meta;
      unique case (keys)
        2'b10: if (!pressed) begin
          sel     <= (sel == SW'(MAX_SEL)) ? '0 : sel + 1'b1;
          pressed <= 1'b1;
        end
        2'b01: if (!pressed) begin
          sel     <= (sel == '0) ? SW'(MAX_SEL) : sel - 1'b1;
          pressed <= 1'b1;
        end
        2'b00: pressed <= 1'b0;
        default: ;                 // both keys: ignored
      endcase
    end
  end

endmodule
