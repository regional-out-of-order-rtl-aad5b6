// l1_model: behavioural model of the L1 data cache and its MSHRs as seen by
// the store path; testbench only, not synthesizable.
//
// The memory holds MEM_WORDS 64-bit words (address bits above are ignored);
// lines are LINE_WORDS words.  A line is "present" (write permission held)
// or not.  A lookup hits when its line is present and has no outstanding
// miss; the write then happens at the clock edge.  Otherwise it is queued in
// an MSHR list with a completion time MISS_MIN..MISS_MAX cycles away; a later
// store to a line that already has a miss outstanding joins it and completes
// no earlier (coalescing), and queued stores of one line complete in arrival
// order.  One completion per cycle is reported on fill_valid/fill_idx, one
// cycle after its write.  With evict_en, a random line not waiting for a miss
// loses its permission now and then, so that misses keep coming.
module l1_model #(
  parameter int unsigned IDX_W      = 6,
  parameter int unsigned AW         = 45,
  parameter int unsigned DW         = 64,
  parameter int unsigned BW         = DW / 8,
  parameter int unsigned MEM_WORDS  = 256,
  parameter int unsigned LINE_WORDS = 8,
  parameter int unsigned MISS_MIN   = 10,
  parameter int unsigned MISS_MAX   = 40,
  parameter int unsigned EVICT_ONE_IN = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             evict_en,
  input  logic             lk_valid,
  input  logic [IDX_W-1:0] lk_idx,
  input  logic [AW-1:0]    lk_addr,
  input  logic [DW-1:0]    lk_data,
  input  logic [BW-1:0]    lk_be,
  output logic             lk_hit,
  output logic             fill_valid,
  output logic [IDX_W-1:0] fill_idx
);
  localparam int unsigned LINES = MEM_WORDS / LINE_WORDS;

  typedef struct {
    logic [IDX_W-1:0] idx;
    int unsigned      word;
    logic [DW-1:0]    data;
    logic [BW-1:0]    be;
    longint unsigned  ready;
  } miss_t;

  logic [DW-1:0]   mem     [MEM_WORDS];
  logic            present [LINES];
  int unsigned     pending [LINES];
  miss_t           q[$];
  longint unsigned now;
  int unsigned     lk_word, lk_line;

  function automatic logic [DW-1:0] merge(input logic [DW-1:0] old, input logic [DW-1:0] nw,
                                          input logic [BW-1:0] be);
    logic [DW-1:0] r = old;
    for (int b = 0; b < int'(BW); b++) if (be[b]) r[8*b +: 8] = nw[8*b +: 8];
    return r;
  endfunction

  // Start state: every word zero, lines with an even number present.
  task automatic init();
    for (int i = 0; i < int'(MEM_WORDS); i++) mem[i] = '0;
    for (int l = 0; l < int'(LINES); l++) begin present[l] = (l % 2 == 0); pending[l] = 0; end
    q.delete();
  endtask

  initial init();

  always_comb begin
    lk_word = int'(lk_addr) % MEM_WORDS;
    lk_line = lk_word / LINE_WORDS;
    lk_hit  = lk_valid && present[lk_line] && (pending[lk_line] == 0);
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now        <= 0;
      fill_valid <= 1'b0;
      fill_idx   <= '0;
    end else begin
      miss_t m;
      int    pick;
      now <= now + 1;
      fill_valid <= 1'b0;
      // Completion of the oldest ready miss whose line has no older one queued.
      pick = -1;
      for (int i = 0; i < q.size(); i++) begin
        logic older_same;
        older_same = 1'b0;
        for (int j = 0; j < i; j++)
          if (q[j].word / LINE_WORDS == q[i].word / LINE_WORDS) older_same = 1'b1;
        if (!older_same && q[i].ready <= now) begin pick = i; break; end
      end
      if (pick >= 0) begin
        m = q[pick];
        mem[m.word] = merge(mem[m.word], m.data, m.be);
        pending[m.word / LINE_WORDS]--;
        present[m.word / LINE_WORDS] = 1'b1;
        fill_valid <= 1'b1;
        fill_idx   <= m.idx;
        q.delete(pick);
      end
      // Lookup.
      if (lk_valid) begin
        if (lk_hit) begin
          mem[lk_word] = merge(mem[lk_word], lk_data, lk_be);
        end else begin
          longint unsigned rdy;
          rdy = now + longint'($urandom_range(MISS_MIN, MISS_MAX));
          foreach (q[i]) if (q[i].word / LINE_WORDS == lk_line && q[i].ready > rdy) rdy = q[i].ready;
          m.idx = lk_idx; m.word = lk_word; m.data = lk_data; m.be = lk_be; m.ready = rdy;
          q.push_back(m);
          pending[lk_line]++;
        end
      end
      // Occasional loss of write permission.
      if (evict_en && $urandom_range(0, EVICT_ONE_IN - 1) == 0) begin
        int l;
        l = $urandom_range(0, LINES - 1);
        if (pending[l] == 0) present[l] = 1'b0;
      end
    end
  end
endmodule
