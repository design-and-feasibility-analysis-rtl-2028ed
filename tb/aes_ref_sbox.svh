// Reference AES S-box for the testbenches, built independently of the RTL
// functions: the field is walked along the powers of the generator 3, while
// a second variable walks the powers of its inverse 3^-1 = 0xf6, so each step
// yields a byte p and its inverse q directly; the affine map is then applied
// to q. fill_ref_sbox() fills sbox[] and inv_sbox[].
`ifndef AES_REF_SBOX_SVH
`define AES_REF_SBOX_SVH

function automatic logic [7:0] ref_rotl(input logic [7:0] v, input int n);
  return (v << n) | (v >> (8 - n));
endfunction

task automatic fill_ref_sbox(output logic [7:0] sbox [256],
                             output logic [7:0] inv_sbox [256]);
  logic [7:0] p, q, s;
  p = 8'h01;
  q = 8'h01;
  do begin
    // p := p * 3
    p = p ^ (p << 1) ^ (p[7] ? 8'h1b : 8'h00);
    // q := q / 3
    q = q ^ (q << 1);
    q = q ^ (q << 2);
    q = q ^ (q << 4);
    if (q[7]) q = q ^ 8'h09;
    s = q ^ ref_rotl(q, 1) ^ ref_rotl(q, 2) ^ ref_rotl(q, 3) ^ ref_rotl(q, 4) ^ 8'h63;
    sbox[p]     = s;
    inv_sbox[s] = p;
  end while (p != 8'h01);
  sbox[0]        = 8'h63;
  inv_sbox[8'h63] = 8'h00;
endtask

`endif
