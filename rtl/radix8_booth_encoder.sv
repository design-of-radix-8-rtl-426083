// Radix-8 modified Booth encoder.
//
// Recodes the multiplier Y, an (N+1)-bit unsigned residue in [0, 2^N], into
// ND = ceil((N+2)/3) signed digits d_i in {-4..+4} with Y = sum d_i * 8^i.
// Digit i looks at the overlapping bit group y[3i+2], y[3i+1], y[3i], y[3i-1]
// (y[-1] = 0, bits above N are 0):
//   d_i = -4*y[3i+2] + 2*y[3i+1] + y[3i] + y[3i-1]
// and is delivered as a sign bit plus a one-hot magnitude, which is what the
// partial product multiplexers select with. The radix-8 recoding follows the
// multiplier's design; the sign/one-hot digit format and the zero extension
// of Y are this implementation's choices. Purely combinational.
module radix8_booth_encoder
  import modmul_pkg::*;
#(
  parameter int N  = 8,
  parameter int ND = num_digits(N)
) (
  input  logic [N:0]         y,
  output booth_digit_t       digit [ND]
);

  localparam int YW = 3 * ND + 1;  // y[-1] plus the zero-extended operand

  logic [YW-1:0] yext;
  assign yext = {{(YW - N - 2){1'b0}}, y, 1'b0};

  for (genvar i = 0; i < ND; i++) begin : g_dig
    logic [3:0] grp;  // {y[3i+2], y[3i+1], y[3i], y[3i-1]}
    assign grp = yext[3*i +: 4];

    always_comb begin
      digit[i] = '0;
      unique case (grp)
        4'b0000, 4'b1111: ;                                       //  0
        4'b0001, 4'b0010: digit[i].m1 = 1'b1;                     // +1
        4'b0011, 4'b0100: digit[i].m2 = 1'b1;                     // +2
        4'b0101, 4'b0110: digit[i].m3 = 1'b1;                     // +3
        4'b0111:          digit[i].m4 = 1'b1;                     // +4
        4'b1000:          begin digit[i].m4 = 1'b1; digit[i].neg = 1'b1; end // -4
        4'b1001, 4'b1010: begin digit[i].m3 = 1'b1; digit[i].neg = 1'b1; end // -3
        4'b1011, 4'b1100: begin digit[i].m2 = 1'b1; digit[i].neg = 1'b1; end // -2
        4'b1101, 4'b1110: begin digit[i].m1 = 1'b1; digit[i].neg = 1'b1; end // -1
        default: ;
      endcase
    end
  end

endmodule
