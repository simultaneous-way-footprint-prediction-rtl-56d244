// btb: branch target buffer, ENTRIES entries, WAYS-way set associative.
//
// Each entry holds (valid, addr_tag, target, kind), indexed by the fetch
// address: set = addr[2 +: SET_W], tag = the address bits above the index
// (21 bits for the default 2K-entry 4-way buffer with 32-bit addresses).
// An entry is identified by (way, set); the way-footprint table uses the
// same (way, set) pair, so the BTB reports the way of every hit.
//
// Ports:
//   lk_*   fetch-side lookup, combinational.  lk_touch marks the hit entry as
//          most recently used (asserted when the fetch really happens).
//   pr_*   NPROBE extra combinational tag probes, used at commit (does the
//          committed instruction have an entry?) and for the WFT update (which
//          way holds the address?).
//   wr_*   commit-side write.  wr_alloc puts a new entry in the LRU way of
//          the set (alloc_way tells which); wr_update rewrites target and kind
//          of an existing entry in way wr_way.
// Timing: reads are combinational, writes take effect at the next clock edge.
//
// The size and associativity follow the document; LRU replacement and the
// kind field (needed to tell returns and calls apart at prediction time) are
// this design's choices.
module btb
  import wfp_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned NPROBE  = 2,
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned SET_W  = $clog2(SETS),
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TAG_W  = ADDR_W - SET_W - 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  addr_t            lk_pc,
  input  logic             lk_touch,
  output logic             lk_hit,
  output logic [WAY_W-1:0] lk_way,
  output addr_t            lk_target,
  output br_kind_e         lk_kind,
  // probes
  input  addr_t            pr_pc  [NPROBE],
  output logic             pr_hit [NPROBE],
  output logic [WAY_W-1:0] pr_way [NPROBE],
  // write
  input  logic             wr_alloc,
  input  logic             wr_update,
  input  logic [WAY_W-1:0] wr_way,
  input  addr_t            wr_pc,
  input  addr_t            wr_target,
  input  br_kind_e         wr_kind,
  output logic [WAY_W-1:0] alloc_way
);

  typedef logic [SET_W-1:0] set_t;
  typedef logic [TAG_W-1:0] tag_t;

  logic     valid_q  [SETS][WAYS];
  logic [WAY_W-1:0] age_q [SETS][WAYS];   // 0 = most recently used
  tag_t     tag_mem  [SETS][WAYS];
  addr_t    tgt_mem  [SETS][WAYS];
  br_kind_e kind_mem [SETS][WAYS];

  function automatic set_t set_of(addr_t a);
    return a[2 +: SET_W];
  endfunction

  function automatic tag_t tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  // ---------------- lookup ----------------
  always_comb begin
    lk_hit    = 1'b0;
    lk_way    = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[set_of(lk_pc)][w] && tag_mem[set_of(lk_pc)][w] == tag_of(lk_pc)) begin
        lk_hit = 1'b1;
        lk_way = WAY_W'(w);
      end
    end
    lk_target = tgt_mem[set_of(lk_pc)][lk_way];
    lk_kind   = kind_mem[set_of(lk_pc)][lk_way];
  end

  // ---------------- probes ----------------
  always_comb begin
    for (int p = 0; p < NPROBE; p++) begin
      pr_hit[p] = 1'b0;
      pr_way[p] = '0;
      for (int w = 0; w < WAYS; w++) begin
        if (valid_q[set_of(pr_pc[p])][w] && tag_mem[set_of(pr_pc[p])][w] == tag_of(pr_pc[p])) begin
          pr_hit[p] = 1'b1;
          pr_way[p] = WAY_W'(w);
        end
      end
    end
  end

  // ---------------- replacement: victim is the oldest way ----------------
  always_comb begin
    alloc_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!valid_q[set_of(wr_pc)][w]) begin
        alloc_way = WAY_W'(w);
        break;
      end
      if (age_q[set_of(wr_pc)][w] == WAY_W'(WAYS - 1)) alloc_way = WAY_W'(w);
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          age_q[s][w]   <= WAY_W'(w);
        end
      end
    end else begin
      if (wr_alloc) begin
        valid_q[set_of(wr_pc)][alloc_way] <= 1'b1;
        for (int w = 0; w < WAYS; w++) begin
          if (age_q[set_of(wr_pc)][w] < age_q[set_of(wr_pc)][alloc_way])
            age_q[set_of(wr_pc)][w] <= age_q[set_of(wr_pc)][w] + 1'b1;
        end
        age_q[set_of(wr_pc)][alloc_way] <= '0;
      end else if (lk_touch && lk_hit) begin
        for (int w = 0; w < WAYS; w++) begin
          if (age_q[set_of(lk_pc)][w] < age_q[set_of(lk_pc)][lk_way])
            age_q[set_of(lk_pc)][w] <= age_q[set_of(lk_pc)][w] + 1'b1;
        end
        age_q[set_of(lk_pc)][lk_way] <= '0;
      end
    end
  end

  // Tag, target and kind arrays: plain memories, no reset (guarded by valid).
  always_ff @(posedge clk) begin
    if (wr_alloc) begin
      tag_mem[set_of(wr_pc)][alloc_way]  <= tag_of(wr_pc);
      tgt_mem[set_of(wr_pc)][alloc_way]  <= wr_target;
      kind_mem[set_of(wr_pc)][alloc_way] <= wr_kind;
    end else if (wr_update) begin
      tgt_mem[set_of(wr_pc)][wr_way]  <= wr_target;
      kind_mem[set_of(wr_pc)][wr_way] <= wr_kind;
    end
  end

endmodule
