// prime_rom: read-only table of the first NB_PRIMES primes (2, 3, 5, 7, ...)
// used as the bases of the deterministic Rabin-Miller test.
//
// The contents are computed at elaboration time by trial division, so
// changing NB_PRIMES needs no data file; PRIMES_DATA_WIDTH must hold the
// largest prime. Read is asynchronous: data_o follows addr_o combinationally.
// Addresses at or beyond NB_PRIMES read as 0.
module prime_rom #(
  parameter int NB_PRIMES         = 12,
  parameter int PRIMES_DATA_WIDTH = 8,
  parameter int PRIMES_ADDR_WIDTH = 4
) (
  input  logic [PRIMES_ADDR_WIDTH-1:0] addr_i,
  output logic [PRIMES_DATA_WIDTH-1:0] data_o
);
  typedef logic [PRIMES_DATA_WIDTH-1:0] word_t;
  typedef word_t table_t [NB_PRIMES];

  function automatic table_t first_primes();
    table_t t;
    int found, cand;
    found = 0;
    cand  = 2;
    while (found < NB_PRIMES) begin
      bit is_p;
      is_p = 1'b1;
      for (int d = 2; d * d <= cand; d++) if (cand % d == 0) is_p = 1'b0;
      if (is_p) begin
        t[found] = word_t'(cand);
        found++;
      end
      cand++;
    end
    return t;
  endfunction

  localparam table_t ROM = first_primes();

  always_comb begin
    data_o = '0;
    for (int i = 0; i < NB_PRIMES; i++)
      if (addr_i == PRIMES_ADDR_WIDTH'(i)) data_o = ROM[i];
  end

endmodule
