// redundancy_array: word-redundancy repair logic (redundant array logic, RLA) with its
// output multiplexer.
//
// WORDS redundant words, each {FA, address, data}: FA (fault asserted) marks a programmed
// word, the address field holds a faulty memory address, the data field stands in for that
// location. One set of WORDS address comparators serves both modes; it looks at the fault
// address in test mode and at the user address in normal mode.
//
// Test & repair mode (test_mode = 1): each 'fault' pulse programs the array. A fault at an
// address already held updates that word's data with the expected data; a new address
// takes the next free word (words fill in order 0, 1, ...). A new faulty address with no
// word left sets the sticky 'overflow' flag: the memory cannot be repaired. 'full' says
// that every word is programmed.
//
// Normal mode (test_mode = 0): 'hit' (combinational) says the user address is held. A
// write on a hit goes into the word's data field (IE); the caller suppresses the memory
// write. A read registers the hit and the word's data (OE); in the next cycle, when the
// memory's synchronous read data arrives on 'mem_q', 'mux_out' selects the redundant data
// on a hit and the memory data otherwise. Between reads 'mux_out' holds its selection.
// Active-low asynchronous reset clears all words.
module redundancy_array #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 1,
  parameter int unsigned WORDS  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_mode,
  // programming from fault diagnosis
  input  logic              fault,
  input  logic [ADDR_W-1:0] fault_addr,
  input  logic [DATA_W-1:0] fault_data,
  // normal-mode access
  input  logic [ADDR_W-1:0] addr,
  input  logic              wr,
  input  logic              rd,
  input  logic [DATA_W-1:0] wdata,
  input  logic [DATA_W-1:0] mem_q,
  output logic              hit,
  output logic [DATA_W-1:0] mux_out,
  output logic [$clog2(WORDS+1)-1:0] used,
  output logic              full,
  output logic              overflow
);

  localparam int unsigned IDX_W = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [WORDS-1:0]  fa;
  logic [ADDR_W-1:0] word_addr [WORDS];
  logic [DATA_W-1:0] word_data [WORDS];

  logic [ADDR_W-1:0] look_addr;
  logic              match_any;
  logic [IDX_W-1:0]  match_idx;
  logic              hit_q;
  logic [DATA_W-1:0] data_q;

  assign look_addr = test_mode ? fault_addr : addr;

  always_comb begin
    match_any = 1'b0;
    match_idx = '0;
    for (int i = 0; i < WORDS; i++) begin
      if (!match_any && fa[i] && word_addr[i] == look_addr) begin
        match_any = 1'b1;
        match_idx = IDX_W'(i);
      end
    end
  end

  assign full = (used == ($clog2(WORDS+1))'(WORDS));
  assign hit  = ~test_mode & match_any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fa       <= '0;
      used     <= '0;
      overflow <= 1'b0;
      hit_q    <= 1'b0;
      data_q   <= '0;
      for (int i = 0; i < WORDS; i++) begin
        word_addr[i] <= '0;
        word_data[i] <= '0;
      end
    end else if (test_mode) begin
      if (fault) begin
        if (match_any) begin
          word_data[match_idx] <= fault_data;
        end else if (!full) begin
          fa[IDX_W'(used)]        <= 1'b1;
          word_addr[IDX_W'(used)] <= fault_addr;
          word_data[IDX_W'(used)] <= fault_data;
          used                    <= used + 1'b1;
        end else begin
          overflow <= 1'b1;
        end
      end
    end else begin
      if (wr && match_any) word_data[match_idx] <= wdata;
      if (rd) begin
        hit_q  <= match_any;
        data_q <= word_data[match_idx];
      end
    end
  end

  assign mux_out = hit_q ? data_q : mem_q;

  // Words are taken in order, never more than exist, and a word is never programmed twice.
  a_used_range: assert property (@(posedge clk) disable iff (!rst_n) int'(used) <= WORDS);
  a_no_double:  assert property (@(posedge clk) disable iff (!rst_n)
                                 (test_mode && fault && !match_any && !full) |=> fa[IDX_W'(used - 1'b1)]);

endmodule
