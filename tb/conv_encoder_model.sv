// conv_encoder_model: behavioural model of the K = 7 convolutional encoder
// for the three code rates, used to drive the decoder tests.
//
// Six memory bits in two 3-bit halves H (older) and L (newer).  Per step the
// k = 3, 2 or 1 input bits u enter L, L moves into H, and at rates below 3/4
// the low 3-k bits of H move into the top of L; the rest of H is dropped.
// Code word: {u ^ h, ^H} with h = {L2^H0, L1^H2^H0, L0^H1}.  Written
// directly from these shift and XOR rules, not from the decoder package, so
// it checks the decoder's trellis tables.  code is combinational from the
// present state and u; the state advances on en.
module conv_encoder_model (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] mode,
  input  logic       en,
  input  logic [2:0] u,
  output logic [3:0] code
);
  logic [2:0] hh, ll;
  logic [2:0] hmask;
  logic [2:0] x;

  always_comb begin
    hmask = (mode == 2'b01) ? 3'b011 : (mode == 2'b10) ? 3'b001 : 3'b111;
    x = (u ^ {ll[2] ^ hh[0], ll[1] ^ hh[2] ^ hh[0], ll[0] ^ hh[1]}) & hmask;
    case (mode)
      2'b01:   code = {1'b0, x[1:0], ^hh};
      2'b10:   code = {2'b00, x[0], ^hh};
      default: code = {x, ^hh};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hh <= '0;
      ll <= '0;
    end else if (en) begin
      hh <= ll;
      case (mode)
        2'b01:   ll <= {hh[0], u[1:0]};
        2'b10:   ll <= {hh[1:0], u[0]};
        default: ll <= u;
      endcase
    end
  end
endmodule
