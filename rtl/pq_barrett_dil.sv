// Barrett reduction modulo the Dilithium prime q = 8380417, for 0 <= x < q^2.
//
// mu = floor(2^46 / q) = 8396807 = 2^23 + 2^13 + 2^3 - 1 and q = 2^23 - 2^13 + 1,
// so both constant multiplications are shifts and additions:
//   t  = ((x << 23) + (x << 13) + (x << 3) - x) >> 46     (estimate of x / q)
//   z  = x - ((t << 23) - (t << 13) + t)                  (0 <= z < 2q)
//   z >= q ? z - q : z                                     (final correction)
// The estimate is at most one below floor(x/q), so one conditional subtraction
// of the modulus input suffices. The widths of the intermediate sums (70, 46
// and 24 bits) are the smallest that hold the values for x < q^2.
// Purely combinational.
// The algorithm is the Dilithium Barrett reduction of PQ.V.ALU.E; the widths
// are this design's choice.
module pq_barrett_dil (
  input  logic [45:0] x_i,   // product, below q^2
  input  logic [22:0] q_i,   // modulus, 8380417
  output logic [22:0] z_o
);
  logic [69:0] xmu;         // x * mu
  logic [22:0] t;           // estimate of floor(x / q)
  logic [45:0] tq;          // t * q
  logic [23:0] z;           // x - t*q, below 2q
  logic [24:0] zq;          // z - q with its borrow in bit 24

  always_comb begin
    xmu = ({24'd0, x_i} << 23) + ({24'd0, x_i} << 13) + ({24'd0, x_i} << 3) - {24'd0, x_i};
    t   = xmu[68:46];
    tq  = ({23'd0, t} << 23) - ({23'd0, t} << 13) + {23'd0, t};
    z   = x_i[23:0] - tq[23:0];
    zq  = {1'b0, z} - {2'b00, q_i};
    z_o = zq[24] ? z[22:0] : zq[22:0];
  end
endmodule
