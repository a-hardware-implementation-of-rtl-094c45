// io_buffer: the BUFFER block, converting between the 16-bit data pins and
// the 233-bit values of the processor.
//
// Input: a 233-bit value is written as 15 words on iDATA, most significant
// word first (the first word carries bits 239..224 of the zero-extended value;
// only its low 9 bits are used). One word is taken per clock while one of the
// select strobes iK_IN, iGX_IN or iGY_IN is high (priority in that order);
// with the 15th word the assembled value is presented on data for one clock
// together with the matching pulse k_in, gx_in or gy_in. The word counter
// restarts whenever no strobe is high. iSTART_ECC is registered and its rising
// edge becomes the one-cycle start_ecc pulse.
//
// Output: on end_ecc the result coordinates data_x and data_y are captured and
// sent as 15 word pairs on oDATA_X / oDATA_Y, most significant word first, one
// pair per clock; oEND_ECC is high during exactly those 15 clocks. The x and y
// words of the same weight appear together.
//
// The 16-bit width and the direction of conversion follow the document; the
// word order, the strobe protocol and oEND_ECC framing are this design's.
module io_buffer
  import ecc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // external pins
  input  logic [IO_W-1:0] iDATA,
  input  logic            iK_IN,
  input  logic            iGX_IN,
  input  logic            iGY_IN,
  input  logic            iSTART_ECC,
  output logic [IO_W-1:0] oDATA_X,
  output logic [IO_W-1:0] oDATA_Y,
  output logic            oEND_ECC,
  // to / from the core
  output gf_t             data,
  output logic            k_in,
  output logic            gx_in,
  output logic            gy_in,
  output logic            start_ecc,
  input  gf_t             data_x,
  input  gf_t             data_y,
  input  logic            end_ecc
);

  localparam int unsigned BW = WORDS * IO_W;   // 240
  localparam int unsigned WC = $clog2(WORDS + 1);

  logic [BW-1:0] in_sr, in_next;
  logic [WC-1:0] in_cnt;
  logic          any_sel;
  logic          start_d;

  logic [BW-1:0] out_x, out_y;
  logic [WC-1:0] out_cnt;

  assign any_sel = iK_IN || iGX_IN || iGY_IN;
  assign in_next = {in_sr[BW-IO_W-1:0], iDATA};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sr   <= '0;
      in_cnt  <= '0;
      k_in    <= 1'b0;
      gx_in   <= 1'b0;
      gy_in   <= 1'b0;
      start_d <= 1'b0;
      start_ecc <= 1'b0;
    end else begin
      k_in  <= 1'b0;
      gx_in <= 1'b0;
      gy_in <= 1'b0;
      if (any_sel) begin
        in_sr <= in_next;
        if (in_cnt == WC'(WORDS - 1)) begin
          in_cnt <= '0;
          k_in   <= iK_IN;
          gx_in  <= !iK_IN && iGX_IN;
          gy_in  <= !iK_IN && !iGX_IN && iGY_IN;
        end else begin
          in_cnt <= in_cnt + 1'b1;
        end
      end else begin
        in_cnt <= '0;
      end
      start_d   <= iSTART_ECC;
      start_ecc <= iSTART_ECC && !start_d;
    end
  end

  assign data = in_sr[M-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_x   <= '0;
      out_y   <= '0;
      out_cnt <= '0;
    end else if (end_ecc) begin
      out_x   <= BW'(data_x);
      out_y   <= BW'(data_y);
      out_cnt <= WC'(WORDS);
    end else if (out_cnt != '0) begin
      out_x   <= out_x << IO_W;
      out_y   <= out_y << IO_W;
      out_cnt <= out_cnt - 1'b1;
    end
  end

  assign oDATA_X  = out_x[BW-1 -: IO_W];
  assign oDATA_Y  = out_y[BW-1 -: IO_W];
  assign oEND_ECC = (out_cnt != '0);

endmodule
