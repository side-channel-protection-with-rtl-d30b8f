// present_r1_gen: draws the random first tables R1 of the PRESENT S-box
// decomposition, one uniformly random permutation of {0..15} per S-box
// position.
//
// Each of the sixteen tables is shuffled in place by a Fisher-Yates shuffle,
// one step per clock: for k = 15 down to 1, entry k is swapped with entry
// j = floor(r * (k + 1) / 256), where r is a fresh random byte per table and
// step (rnd[8*i +: 8] for table i). The multiply-and-shift maps r onto 0..k
// with a bias of at most one part in 16 between indices, without a divider.
//
// Timing: start (one cycle, while busy is low) resets all tables to the
// identity; if shuffle is high the next 15 cycles perform the swaps,
// otherwise the tables stay the identity (decomposition off). busy stays high
// for those 15 cycles in both cases and done pulses in the cycle after.
// r1[i][x] is R1_i(x); the tables hold their value until the next start.
module present_r1_gen (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  shuffle,
  input  logic [127:0]          rnd,
  output logic                  busy,
  output logic [15:0][15:0][3:0] r1,
  output logic                  done
);
  logic [3:0] k;
  logic       shuf_q;

  function automatic logic [3:0] pick(input logic [7:0] r, input logic [3:0] kk);
    logic [12:0] p;
    p = 13'(r) * 13'({1'b0, kk} + 5'd1);
    return p[11:8];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      k      <= '0;
      shuf_q <= 1'b0;
      for (int i = 0; i < 16; i++)
        for (int x = 0; x < 16; x++) r1[i][x] <= 4'(x);
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        k      <= 4'd15;
        shuf_q <= shuffle;
        for (int i = 0; i < 16; i++)
          for (int x = 0; x < 16; x++) r1[i][x] <= 4'(x);
      end else if (busy) begin
        if (shuf_q) begin
          for (int i = 0; i < 16; i++) begin
            logic [3:0] j;
            j = pick(rnd[8*i +: 8], k);
            r1[i][k] <= r1[i][j];
            r1[i][j] <= r1[i][k];
          end
        end
        k <= k - 4'd1;
        if (k == 4'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
