// Sort: sequential bubble sort of (key, payload) pairs, largest key first.
//
// Used twice per frame: in NMS it orders the candidate boxes of one class by
// confidence, and in the final step it orders all kept detections so the best
// K can be written out. Entries are appended one per cycle with `push`; an
// entry pushed while the array already holds N entries is dropped and sets
// `overflow` (the description does not say how many candidates the sorter
// holds; N = 64 is this design's choice). `start` runs bubble-sort passes,
// one compare-and-swap of neighbours per cycle, until a pass makes no swap,
// then pulses `done`. Equal keys are never swapped, so ties keep their push
// order. `rd_idx` reads any entry combinationally, sorted or not.
//
// Timing: a pass over n entries takes n-1 cycles, at most n passes, so a sort
// takes at most about n*n cycles.
module puppis_sort #(
  parameter int unsigned N  = 64,
  parameter int unsigned KW = 16,
  parameter int unsigned PW = 16,
  localparam int unsigned IW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  logic [KW-1:0] push_key,
  input  logic [PW-1:0] push_payload,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [IW-1:0] count,
  output logic          overflow,
  input  logic [IW-1:0] rd_idx,
  output logic [KW-1:0] rd_key,
  output logic [PW-1:0] rd_payload
);
  logic [KW-1:0] key [N];
  logic [PW-1:0] pay [N];
  logic [IW-1:0] pos;      // left element of the pair being compared
  logic [IW-1:0] limit;    // last pair of the current pass is (limit-1, limit)
  logic          swapped;

  // array indices: pos and pos + 1 are below limit <= N - 1, count below N
  localparam int unsigned XW = (N > 1) ? $clog2(N) : 1;
  logic [XW-1:0] pi, pn;
  assign pi = pos[XW-1:0];
  assign pn = XW'(pos + 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      pos      <= '0;
      limit    <= '0;
      swapped  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        count    <= '0;
        overflow <= 1'b0;
        busy     <= 1'b0;
      end else if (push && !busy) begin
        if (count < IW'(N)) begin
          key[count[XW-1:0]] <= push_key;
          pay[count[XW-1:0]] <= push_payload;
          count      <= count + 1'b1;
        end else begin
          overflow <= 1'b1;
        end
      end else if (start && !busy) begin
        if (count < 2) begin
          done <= 1'b1;
        end else begin
          busy    <= 1'b1;
          pos     <= '0;
          limit   <= count - 1'b1;
          swapped <= 1'b0;
        end
      end else if (busy) begin
        logic do_swap;
        do_swap = key[pi] < key[pn];
        if (do_swap) begin
          key[pi]   <= key[pn];
          key[pn] <= key[pi];
          pay[pi]   <= pay[pn];
          pay[pn] <= pay[pi];
        end
        if (pos + 1'b1 == limit) begin
          // End of a pass: the smallest key of this pass has sunk to `limit`.
          if (!(swapped || do_swap) || limit == 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            limit   <= limit - 1'b1;
            pos     <= '0;
            swapped <= 1'b0;
          end
        end else begin
          pos     <= pos + 1'b1;
          swapped <= swapped | do_swap;
        end
      end
    end
  end

  assign rd_key     = key[XW'(rd_idx)];
  assign rd_payload = pay[XW'(rd_idx)];
endmodule
