// avro_tb_pkg: reference Avro encoder used by the testbenches. It builds the
// byte sequences the parser blocks must accept, independently of the RTL:
// zigzag varints (int, long, enum, lengths, counts, union index), fixed and
// float fields (little-endian), strings (length + bytes), and the wire-format
// framing (4-byte big-endian length per buffer, zero-length end marker).
package avro_tb_pkg;
  typedef byte unsigned bq_t[$];

  function automatic void put_long(ref bq_t q, input longint v);
    longint unsigned z;
    z = longint'(v <<< 1) ^ longint'(v >>> 63);
    do begin
      if (z > 127) q.push_back(byte'(8'h80 | (z & 8'h7f)));
      else         q.push_back(byte'(z));
      z = z >> 7;
    end while (z != 0);
  endfunction

  function automatic void put_fixed(ref bq_t q, input logic [127:0] v, input int n);
    for (int i = 0; i < n; i++) q.push_back(v[8*i +: 8]);
  endfunction

  function automatic void put_float(ref bq_t q, input logic [31:0] f);
    put_fixed(q, 128'(f), 4);
  endfunction

  function automatic void put_string(ref bq_t q, input string s);
    put_long(q, s.len());
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
  endfunction

  // wrap a buffer in the wire format
  function automatic void put_buffer(ref bq_t q, input bq_t data);
    int unsigned n = data.size();
    q.push_back(n[31:24]); q.push_back(n[23:16]); q.push_back(n[15:8]); q.push_back(n[7:0]);
    foreach (data[i]) q.push_back(data[i]);
  endfunction

  function automatic void put_end(ref bq_t q);
    repeat (4) q.push_back(8'h00);
  endfunction

  // value of string s as the parser blocks present it: last character in
  // bits [7:0], first character highest, unused upper bytes zero
  function automatic logic [255:0] str_val(input string s);
    logic [255:0] r = '0;
    for (int i = 0; i < s.len(); i++) r = {r[247:0], 8'(s[i])};
    return r;
  endfunction

  function automatic longint rand_long();
    longint v = {$urandom, $urandom};
    int sh = $urandom_range(63, 0);
    return v >>> sh;
  endfunction

  // ---------------- object generators of the three schemas ----------------
  function automatic void car_obj(ref bq_t q, input int id, input string name,
                                  input int serial, input logic [31:0] hp);
    put_long(q, id);
    put_string(q, name);
    put_long(q, serial);
    put_float(q, hp);
  endfunction

  function automatic void yahoo_obj(ref bq_t q, input logic [127:0] user, page, ad,
                                    input int ad_type, event_type,
                                    input longint event_time, input string ip);
    put_fixed(q, user, 16);
    put_fixed(q, page, 16);
    put_fixed(q, ad, 16);
    put_long(q, ad_type);
    put_long(q, event_type);
    put_long(q, event_time);
    put_string(q, ip);
  endfunction

  // RIOTBench object: timestamp and a map written as one block of all entries
  // (or two blocks when split is set), closed by a zero count.
  function automatic void riot_obj(ref bq_t q, input longint ts, input string keys[$],
                                   input int branch[$], input logic [31:0] vals[$],
                                   input bit split);
    int n = keys.size();
    int h = split ? n / 2 : n;
    put_long(q, ts);
    if (n > 0) begin
      put_long(q, h);
      for (int i = 0; i < n; i++) begin
        if (split && i == h) put_long(q, n - h);
        put_string(q, keys[i]);
        put_long(q, branch[i]);
        put_float(q, vals[i]);
      end
    end
    put_long(q, 0);
  endfunction

  // order-preserving key of an IEEE single, for reference comparisons
  function automatic logic [31:0] fkey(input logic [31:0] f);
    return f[31] ? ~f : (f | 32'h8000_0000);
  endfunction

  // ---------------- 64-bit AXI-Stream beats ----------------
  typedef struct packed { logic [63:0] data; logic [7:0] keep; } beat_t;

  // pack a byte stream into beats; with holes set, lanes are now and then
  // left empty (tkeep 0) to exercise sparse beats
  function automatic void pack_beats(ref beat_t beats[$], input bq_t q, input bit holes);
    beat_t b;
    int lane = 0;
    int i = 0;
    b = '0;
    while (i < q.size()) begin
      if (holes && $urandom_range(9, 0) == 0) begin
        lane++;
      end else begin
        b.data[8*lane +: 8] = q[i];
        b.keep[lane] = 1'b1;
        lane++;
        i++;
      end
      if (lane == 8) begin beats.push_back(b); b = '0; lane = 0; end
    end
    if (lane != 0) beats.push_back(b);
  endfunction
endpackage
