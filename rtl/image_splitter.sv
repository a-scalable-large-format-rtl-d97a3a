// Image splitter of the host module: cuts the wall image into fragments.
//
// The source image is NUM_MODULES screens wide (NUM_MODULES * H_ACTIVE by
// V_ACTIVE pixels, one 24-bit pixel per 32-bit word, raster order, starting
// at word SRC_BASE of the host memory). After 'start' the splitter walks it
// line by line; each line is cut into FRAG_PIXELS-pixel pieces, and each
// piece becomes one fragment: a header naming the screen it lies on
// (module ID = x / H_ACTIVE) and its offset on that screen
// (y * H_ACTIVE + x mod H_ACTIVE), followed by its pixels. 'done' pulses after
// the last fragment of the image has been sent.
//
// The splitter reads one pixel at a time: it requests the word, waits for
// the read data, and then offers the pixel on the stream until it is taken,
// so a fragment takes about 4 clocks per pixel with a two-cycle memory.
// Splitting the image and tagging each piece with a screen ID follows the
// original host module (where it is done in software before the pieces are
// sent as UDP packets); the visiting order and the read engine are this
// design's choice.
module image_splitter #(
  parameter int unsigned NUM_MODULES = 2,
  parameter int unsigned H_ACTIVE    = 640,
  parameter int unsigned V_ACTIVE    = 480,
  parameter int unsigned SRC_AW      = 25,   // 2^25 words = 128 MB
  parameter int unsigned SRC_BASE    = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              frag_sent,   // pulses when a header is taken
  // host memory read port
  output logic              src_req,
  output logic [SRC_AW-1:0] src_addr,
  input  logic              src_gnt,
  input  logic              src_rvalid,
  input  logic [31:0]       src_rdata,
  // fragment stream towards the first zero-client module
  output logic              out_valid,
  output zc_pkg::beat_t     out_beat,
  input  logic              out_ready
);

  import zc_pkg::*;

  localparam int unsigned FRAGS_PER_LINE = H_ACTIVE / FRAG_PIXELS;
  localparam int unsigned W_TOTAL        = NUM_MODULES * H_ACTIVE;

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_REQ, S_WAIT, S_PIX} state_t;

  state_t      state;
  logic [11:0] y;          // line
  logic [7:0]  m;          // screen (module ID)
  logic [11:0] c;          // fragment within the screen line
  logic [7:0]  k;          // pixel within the fragment
  logic [23:0] pix_q;
  logic [11:0] x_local;    // column on the screen

  always_comb begin
    x_local   = 12'(c * FRAG_PIXELS) + 12'(k);
    src_addr  = SRC_AW'(SRC_BASE) + SRC_AW'(y) * SRC_AW'(W_TOTAL)
              + SRC_AW'(m) * SRC_AW'(H_ACTIVE) + SRC_AW'(x_local);
    src_req   = (state == S_REQ);
    busy      = (state != S_IDLE);
    out_valid = (state == S_HDR) || (state == S_PIX);
    out_beat.sop  = (state == S_HDR);
    out_beat.eop  = (state == S_PIX) && (k == 8'(FRAG_PIXELS - 1));
    out_beat.data = (state == S_HDR)
                  ? pack_hdr(m, OFFSET_W'(y) * OFFSET_W'(H_ACTIVE) + OFFSET_W'(x_local))
                  : {8'h00, pix_q};
    frag_sent = (state == S_HDR) && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      y     <= '0;
      m     <= '0;
      c     <= '0;
      k     <= '0;
      pix_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          y <= '0; m <= '0; c <= '0; k <= '0;
          state <= S_HDR;
        end
        S_HDR:  if (out_ready) state <= S_REQ;
        S_REQ:  if (src_gnt)   state <= S_WAIT;
        S_WAIT: if (src_rvalid) begin
          pix_q <= src_rdata[23:0];
          state <= S_PIX;
        end
        S_PIX:  if (out_ready) begin
          if (k != 8'(FRAG_PIXELS - 1)) begin
            k     <= k + 8'd1;
            state <= S_REQ;
          end else begin
            k     <= '0;
            state <= S_HDR;
            if (c != 12'(FRAGS_PER_LINE - 1)) begin
              c <= c + 12'd1;
            end else begin
              c <= '0;
              if (m != 8'(NUM_MODULES - 1)) begin
                m <= m + 8'd1;
              end else begin
                m <= '0;
                if (y != 12'(V_ACTIVE - 1)) begin
                  y <= y + 12'd1;
                end else begin
                  y     <= '0;
                  state <= S_IDLE;
                  done  <= 1'b1;
                end
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (H_ACTIVE % FRAG_PIXELS == 0)
    else $error("H_ACTIVE must be a multiple of FRAG_PIXELS");

endmodule
