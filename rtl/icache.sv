// icache: set-associative instruction cache with way-selective access.
//
// SIZE_BYTES / (IC_WAYS * LINE_BYTES) sets (256 for 32 KB, 4 ways, 32-byte
// lines).  Every way is a separate bank (its tag and data subarrays) with
// its own enable.  The way-footprint of an access, req_wf, decides which
// banks are enabled: one way for a one-way access, all of them for an
// all-way access.  Only enabled banks take part in the tag compare, so a
// one-way access whose footprint names the wrong way reports a miss even if
// the line is in another way; the fetch unit then repeats it all-way.
//
// Ports and timing:
//   req_*    access, combinational: hit, hit_way (as a way-footprint), the
//            addressed 32-bit instruction and way_en (banks switched on).
//            A hit with req_valid makes the way most recently used.
//   fill_*   refill of a whole line at the next clock edge into the LRU way
//            (or an invalid way) of its set; fill_way reports the choice.
// Size, associativity and line length follow the document; LRU replacement
// and the one-beat refill are this design's choices.
module icache
  import wfp_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 32768,
  localparam int unsigned WAYS      = IC_WAYS,
  localparam int unsigned SETS      = SIZE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned SET_W     = $clog2(SETS),
  localparam int unsigned OFS_W     = $clog2(LINE_BYTES),
  localparam int unsigned WORD_W    = OFS_W - 2,
  localparam int unsigned TAG_W     = ADDR_W - SET_W - OFS_W,
  localparam int unsigned WAY_W     = $clog2(WAYS),
  localparam int unsigned LINE_W    = LINE_BYTES * 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  addr_t             req_pc,
  input  wf_t               req_wf,
  output logic              hit,
  output wf_t               hit_way,
  output logic [31:0]       instr,
  output logic [WAYS-1:0]   way_en,
  input  logic              fill_valid,
  input  addr_t             fill_addr,
  input  logic [LINE_W-1:0] fill_line,
  output wf_t               fill_way
);

  typedef logic [TAG_W-1:0] tag_t;

  logic [SET_W-1:0]  rset, fset;
  tag_t              rtag, ftag;
  logic [WORD_W-1:0] rword;
  assign rset  = req_pc[OFS_W +: SET_W];
  assign rtag  = req_pc[ADDR_W-1 -: TAG_W];
  assign rword = req_pc[2 +: WORD_W];
  assign fset  = fill_addr[OFS_W +: SET_W];
  assign ftag  = fill_addr[ADDR_W-1 -: TAG_W];

  // Bank enables from the way-footprint.
  always_comb begin
    for (int w = 0; w < WAYS; w++)
      way_en[w] = req_valid && (!wf_is_one_way(req_wf) || req_wf == wf_t'(w));
  end

  // ---------------- one bank per way ----------------
  logic [WAYS-1:0] bank_hit;
  logic [31:0]     bank_word [WAYS];
  logic [WAY_W-1:0] victim;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic              valid_q [SETS];
    tag_t              tag_mem [SETS];
    logic [LINE_W-1:0] data_mem [SETS];
    logic [LINE_W-1:0] rline;

    assign rline        = data_mem[rset];
    assign bank_hit[w]  = way_en[w] && valid_q[rset] && tag_mem[rset] == rtag;
    assign bank_word[w] = rline[rword*32 +: 32];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < SETS; s++) valid_q[s] <= 1'b0;
      end else if (fill_valid && victim == WAY_W'(w)) begin
        valid_q[fset] <= 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (fill_valid && victim == WAY_W'(w)) begin
        tag_mem[fset]  <= ftag;
        data_mem[fset] <= fill_line;
      end
    end
  end

  always_comb begin
    hit     = 1'b0;
    hit_way = WF_ALL;
    instr   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (bank_hit[w]) begin
        hit     = 1'b1;
        hit_way = wf_t'(w);
        instr   = bank_word[w];
      end
    end
  end

  // ---------------- LRU replacement ----------------
  logic [WAY_W-1:0] age_q [SETS][WAYS];   // 0 = most recently used
  logic [WAYS-1:0]  fvalid;

  for (genvar w = 0; w < WAYS; w++) begin : g_fv
    assign fvalid[w] = g_way[w].valid_q[fset];
  end

  always_comb begin
    victim = '0;
    for (int w = 0; w < WAYS; w++)
      if (age_q[fset][w] == WAY_W'(WAYS - 1)) victim = WAY_W'(w);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!fvalid[w]) victim = WAY_W'(w);
  end
  assign fill_way = wf_t'(victim);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          age_q[s][w] <= WAY_W'(w);
    end else if (fill_valid) begin
      for (int w = 0; w < WAYS; w++)
        if (age_q[fset][w] < age_q[fset][victim]) age_q[fset][w] <= age_q[fset][w] + 1'b1;
      age_q[fset][victim] <= '0;
    end else if (req_valid && hit) begin
      for (int w = 0; w < WAYS; w++)
        if (age_q[rset][w] < age_q[rset][hit_way[WAY_W-1:0]]) age_q[rset][w] <= age_q[rset][w] + 1'b1;
      age_q[rset][hit_way[WAY_W-1:0]] <= '0;
    end
  end

endmodule
