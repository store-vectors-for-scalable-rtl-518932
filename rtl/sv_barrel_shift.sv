// sv_barrel_shift: aligns a store vector with the store queue.
//
// A store vector is kept by relative age (bit a = the (a+1)-th most recent store
// before the load). The load scheduling matrix has one column per store queue
// entry, and the most recent store sits in entry tail-1. This shifter places
// vector bit a on column (tail-1-a) mod STQ:  row[i] = vec[(tail-1-i) mod STQ].
// Drawn with the most recent store on the right, this is a right rotation by the
// tail pointer, which is how it is built here: the vector is bit-reversed (and
// zero-extended when VLEN < STQ) and passed through log2(STQ) rotate stages, each
// rotating right by a power of two when its bit of the tail is set.
// Purely combinational. STQ must be a power of two; VLEN <= STQ.
module sv_barrel_shift #(
  parameter int unsigned STQ  = sv_pkg::STQ_ENTRIES,
  parameter int unsigned VLEN = sv_pkg::SV_LEN,
  localparam int unsigned TW = $clog2(STQ)
) (
  input  logic [VLEN-1:0] vec,
  input  logic [TW-1:0]   tail,
  output logic [STQ-1:0]  row
);
  // stage[0]: display order, display position p holds age STQ-1-p
  logic [STQ-1:0] stage [TW+1];

  always_comb begin
    for (int p = 0; p < STQ; p++) begin
      stage[0][p] = (STQ - 1 - p < VLEN) ? vec[STQ-1-p] : 1'b0;
    end
    for (int s = 0; s < TW; s++) begin
      for (int p = 0; p < STQ; p++) begin
        // rotate right (towards higher positions) by 2^s
        stage[s+1][p] = tail[s] ? stage[s][(p + STQ - (1 << s)) % STQ] : stage[s][p];
      end
    end
  end

  assign row = stage[TW];
endmodule
