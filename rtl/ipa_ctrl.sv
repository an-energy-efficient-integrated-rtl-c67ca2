// ipa_ctrl: the IPA controller - context loader and kernel sequencer.
//
// On a `start` pulse from the host it reads the kernel's context from the
// global context memory (GCM), starting at word ctx_base, and writes it over
// the context bus into the PEs' instruction and constant register files,
// eight bytes (two entries) per cycle. Then it starts the array and waits
// until every used PE has executed EXIT, raises `done` for one cycle and
// returns to idle. `busy` is high from start to done.
//
// Context layout (64-bit GCM words), per used PE:
//   header  [63:60] = 4'h1, [59:52] PE index, [45:40] instruction count ni,
//           [36:32] constant count nc
//   ceil(ni/2) words: instructions in [19:0] then [51:32]
//   ceil(nc/2) words: constants in [31:0] then [63:32]
// and a final word with [63:60] = 4'hF. PEs without a segment stay unused
// and clock-gated for the whole kernel.
//
// Timing: the GCM read is synchronous, so the word requested in one cycle is
// written to the PEs in the next. A context of W words (headers and end word
// included) takes W + 1 cycles to load, counted in cfg_cycles; exec_cycles
// counts the cycles from the array's start to the last EXIT. The controller's
// role follows the architecture; the context format and the host handshake
// are this implementation's.
// cfg_data carries the GCM read word straight to the PEs (the PEs pick the
// slots they need), so those output bits are wires from gcm_rdata.
module ipa_ctrl
  import ipa_pkg::*;
#(
  parameter int unsigned NPE    = 16,
  parameter int unsigned GCM_AW = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              start,
  input  logic [GCM_AW-1:0] ctx_base,
  output logic              busy,
  output logic              done,
  output logic [31:0]       cfg_cycles,
  output logic [31:0]       exec_cycles,
  // GCM read port
  output logic              gcm_re,
  output logic [GCM_AW-1:0] gcm_raddr,
  input  logic [63:0]       gcm_rdata,
  // context bus to the PE array
  output logic [7:0]        cfg_pe,
  output logic [1:0]        cfg_irf_we,
  output logic [1:0]        cfg_crf_we,
  output logic [4:0]        cfg_idx,
  output logic [63:0]       cfg_data,
  output logic [NPE-1:0]    used,
  output logic              pea_start,
  input  logic              pea_done
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_START, S_RUN} state_e;
  typedef enum logic [1:0] {K_HDR, K_INS, K_CON} kind_e;

  state_e            state;
  kind_e             kind;
  logic [GCM_AW-1:0] ptr;
  logic [7:0]        pe;
  logic [5:0]        ni, nc, cnt;
  logic [3:0]        tag;
  logic [5:0]        hdr_ni, hdr_nc;

  assign tag    = gcm_rdata[63:60];
  assign hdr_ni = gcm_rdata[45:40];
  assign hdr_nc = {1'b0, gcm_rdata[36:32]};

  assign busy      = state != S_IDLE;
  assign pea_start = state == S_START;

  // the next word is requested while the current one is consumed
  always_comb begin
    gcm_re    = 1'b0;
    gcm_raddr = ptr;
    if (state == S_IDLE && start) begin
      gcm_re    = 1'b1;
      gcm_raddr = ctx_base;
    end else if (state == S_LOAD && !(kind == K_HDR && tag != CTX_TAG_PE)) begin
      gcm_re    = 1'b1;
      gcm_raddr = ptr + 1'b1;
    end
  end

  // context bus
  always_comb begin
    cfg_pe     = pe;
    cfg_idx    = 5'(cnt);
    cfg_data   = gcm_rdata;
    cfg_irf_we = 2'b00;
    cfg_crf_we = 2'b00;
    if (state == S_LOAD && kind == K_INS) begin
      cfg_irf_we = {(cnt + 6'd1) < ni, 1'b1};
    end else if (state == S_LOAD && kind == K_CON) begin
      cfg_crf_we = {(cnt + 6'd1) < nc, 1'b1};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      kind        <= K_HDR;
      ptr         <= '0;
      pe          <= '0;
      ni          <= '0;
      nc          <= '0;
      cnt         <= '0;
      used        <= '0;
      done        <= 1'b0;
      cfg_cycles  <= '0;
      exec_cycles <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state       <= S_LOAD;
          kind        <= K_HDR;
          ptr         <= ctx_base;
          used        <= '0;
          cfg_cycles  <= 32'd1;
          exec_cycles <= '0;
        end
        S_LOAD: begin
          cfg_cycles <= cfg_cycles + 1;
          ptr        <= ptr + 1'b1;
          unique case (kind)
            K_HDR: begin
              if (tag == CTX_TAG_PE) begin
                pe  <= gcm_rdata[59:52];
                ni  <= hdr_ni;
                nc  <= hdr_nc;
                cnt <= '0;
                for (int q = 0; q < int'(NPE); q++) if (int'(gcm_rdata[59:52]) == q) used[q] <= 1'b1;
                kind <= (hdr_ni != 0) ? K_INS : ((hdr_nc != 0) ? K_CON : K_HDR);
              end else begin
                state <= S_START;   // end tag (or anything else) closes the context
              end
            end
            K_INS: begin
              if (cnt + 6'd2 >= ni) begin
                cnt  <= '0;
                kind <= (nc != 0) ? K_CON : K_HDR;
              end else begin
                cnt <= cnt + 6'd2;
              end
            end
            K_CON: begin
              if (cnt + 6'd2 >= nc) begin
                cnt  <= '0;
                kind <= K_HDR;
              end else begin
                cnt <= cnt + 6'd2;
              end
            end
            default: kind <= K_HDR;
          endcase
        end
        S_START: begin
          state <= S_RUN;
        end
        S_RUN: begin
          if (pea_done) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            exec_cycles <= exec_cycles + 1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
