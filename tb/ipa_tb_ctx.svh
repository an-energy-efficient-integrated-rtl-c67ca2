// ipa_tb_ctx.svh: shared testbench code for whole-IPA tests - a per-PE
// program/constant store, the packing of those into 64-bit context words
// (segment header, two instructions per word, two constants per word, end
// word) and host-side tasks that preload the GCM and access the TCDM.
// Include it inside a testbench module that declares clk and the ipa_top
// host signals.
  logic [19:0] prog  [16][32];
  int          np    [16];
  logic [31:0] cons  [16][16];
  int          nc    [16];
  logic [63:0] ctx   [$];

  task automatic clear_programs();
    for (int p = 0; p < 16; p++) begin np[p] = 0; nc[p] = 0; end
  endtask

  task automatic put(input int pe, input logic [19:0] ins);
    prog[pe][np[pe]] = ins; np[pe]++;
  endtask

  task automatic set_const(input int pe, input int idx, input logic [31:0] v);
    cons[pe][idx] = v;
    if (nc[pe] < idx + 1) nc[pe] = idx + 1;
  endtask

  task automatic build_context();
    ctx.delete();
    for (int p = 0; p < 16; p++) begin
      if (np[p] == 0 && nc[p] == 0) continue;
      ctx.push_back({4'h1, 8'(p), 6'd0, 6'(np[p]), 3'd0, 5'(nc[p]), 32'd0});
      for (int k = 0; k < np[p]; k += 2)
        ctx.push_back({12'd0, (k + 1 < np[p]) ? prog[p][k+1] : 20'd0, 12'd0, prog[p][k]});
      for (int k = 0; k < nc[p]; k += 2)
        ctx.push_back({(k + 1 < nc[p]) ? cons[p][k+1] : 32'd0, cons[p][k]});
    end
    ctx.push_back({4'hF, 60'd0});
  endtask

  task automatic preload_context();
    foreach (ctx[k]) begin
      @(negedge clk); gcm_we = 1; gcm_waddr = 10'(k); gcm_wdata = ctx[k];
    end
    @(negedge clk); gcm_we = 0;
  endtask

  task automatic host_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    h_req = 1; h_we = 1; h_addr = a; h_wdata = d;
    #1; while (!h_gnt) begin @(negedge clk); #1; end
    @(negedge clk); h_req = 0; h_we = 0;
  endtask

  task automatic host_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    h_req = 1; h_we = 0; h_addr = a;
    #1; while (!h_gnt) begin @(negedge clk); #1; end
    d = h_rdata;
    @(negedge clk); h_req = 0;
  endtask

  task automatic run_kernel();
    @(negedge clk); start = 1; ctx_base = 0;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
  endtask
