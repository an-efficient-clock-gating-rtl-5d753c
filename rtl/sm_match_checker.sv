// sm_match_checker: decides whether subtrees of the gating function have a
// strong match among existing logic nodes.
//
// For K pairs (subtree sb_k, node n_k) at once it applies every one of the
// 2**NIN input patterns in turn on `pattern`, one pattern per clock cycle, and
// compares the two outputs of each pair, which come back combinationally on
// `sub_val` and `node_val`. A pair matches when its outputs agree on every
// pattern, which is the bottom-up output comparison the design uses to prove
// two factored forms equivalent; searching for a match therefore takes many
// clock cycles, as the design notes.
//
// Interface: a `start` pulse (sampled on a rising clock edge while not busy)
// begins a scan; `busy` is high during it. `done` rises 2**NIN + 1 rising
// edges after the edge that sampled `start` and stays high, with `match` valid,
// until the next start. The exhaustive scan, the handshake and the
// asynchronous active-low reset are this implementation's choices: the design
// gives the comparison, not the circuit that performs it.
module sm_match_checker #(
  parameter int unsigned NIN = 4,  // number of input variables scanned
  parameter int unsigned K   = 3   // number of subtree/node pairs
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic [NIN-1:0] pattern,
  input  logic [K-1:0]   sub_val,
  input  logic [K-1:0]   node_val,
  output logic           busy,
  output logic           done,
  output logic [K-1:0]   match
);

  typedef enum logic [1:0] {IDLE, SCAN, DONE} state_t;

  state_t         state;
  logic [K-1:0]   mism;      // pairs that have differed on some pattern
  logic [K-1:0]   diff_now;  // pairs that differ on the current pattern
  logic           last;

  assign diff_now = sub_val ^ node_val;
  assign last     = (pattern == {NIN{1'b1}});
  assign busy     = (state == SCAN);
  assign done     = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      pattern <= '0;
      mism    <= '0;
      match   <= '0;
    end else begin
      unique case (state)
        IDLE, DONE: begin
          if (start) begin
            state   <= SCAN;
            pattern <= '0;
            mism    <= '0;
          end
        end
        SCAN: begin
          if (last) begin
            match <= ~(mism | diff_now);
            state <= DONE;
          end else begin
            mism    <= mism | diff_now;
            pattern <= pattern + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Handshake rules: never busy and done at once; a scan ends with done.
  a_busy_done_excl: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(busy && done));
  a_scan_ends: assert property (@(posedge clk) disable iff (!rst_n)
                                busy && last |=> done);

endmodule
