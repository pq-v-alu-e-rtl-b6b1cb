// Barrett reduction modulo the Kyber prime q = 3329, for 0 <= x < q^2.
//
// mu = floor(2^24 / q) = 5039. The estimate t = (5039 * x) >> 24 is formed with
// a constant multiplier (left to synthesis; 5039 = 2^12 + 2^9 + 2^8 + 2^7 + 2^5
// + 2^3 + 2^2 + 2^1 + 2^0), then t * q is built as (t << 11) + (t << 10) +
// (t << 8) + t and subtracted from x. The difference lies in [0, 2q), so one
// conditional subtraction of the modulus input finishes the reduction.
// Purely combinational.
// The algorithm is the Kyber Barrett reduction of PQ.V.ALU.E.
module pq_barrett_kyb (
  input  logic [23:0] x_i,   // product, below q^2
  input  logic [11:0] q_i,   // modulus, 3329
  output logic [11:0] z_o
);
  logic [36:0] xmu;         // x * mu
  logic [11:0] t;           // estimate of floor(x / q)
  logic [23:0] tq;          // t * q
  logic [12:0] z;           // x - t*q, below 2q
  logic [13:0] zq;          // z - q with its borrow in bit 13

  always_comb begin
    xmu = {13'd0, x_i} * {24'd0, pq_pkg::MU_KYB};
    t   = xmu[35:24];
    tq  = ({12'd0, t} << 11) + ({12'd0, t} << 10) + ({12'd0, t} << 8) + {12'd0, t};
    z   = x_i[12:0] - tq[12:0];
    zq  = {1'b0, z} - {2'b00, q_i};
    z_o = zq[13] ? z[11:0] : zq[11:0];
  end
endmodule
